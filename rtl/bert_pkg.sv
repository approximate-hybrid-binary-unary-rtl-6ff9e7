// bert_pkg: shared types of the BERT encoder accelerator.
//
// post_op_e selects the non-linear layer applied to the result of a
// matrix-multiply-and-add pass: none (the raw 32-bit accumulations, e.g.
// for the attention products), Trimmed GELU (feed-forward activation) or
// Softmax (attention scores).
//
// Source: the three post-operations follow the paper's accelerator; their
// encoding is this design's own.
package bert_pkg;
  typedef enum logic [1:0] {
    POST_NONE    = 2'd0,
    POST_GELU    = 2'd1,
    POST_SOFTMAX = 2'd2
  } post_op_e;
endpackage
