// mma_layer: matrix-vector multiply and bias add, y = W x + b.
//
// Conventional binary arithmetic, as in the document's encoder accelerator:
// 8-bit signed inputs and weights, 32-bit signed bias and accumulation,
// vector length N_IN = N_OUT = 128 and a reuse factor of 64, i.e. each
// multiplier is used 64 times per vector. Here every cycle consumes
// N_IN/REUSE input elements against all N_OUT weight columns, so the layer
// holds N_OUT * N_IN / REUSE multipliers (256 at the defaults) and a full
// 128x128 product takes REUSE cycles.
//
// Weights live in an N_IN-entry memory; entry i holds the N_OUT weights
// that multiply x[i] and is written through w_we / w_idx / w_col. The bias
// vector is written through b_we / b_vec. Weights and bias must not be
// written while a vector is being processed.
//
// Handshake and timing: a vector is accepted when in_valid and in_ready are
// both high; in_ready is low while one is in flight. The accepting clock
// edge loads the vector and the bias, the next REUSE edges accumulate, and
// the last of them writes y and raises out_valid for one cycle: REUSE + 1
// cycles in all (65 at the defaults, the document's count for this layer).
// y holds its value until the next result. A new vector can be accepted in
// the cycle after out_valid. The internal organisation is this design's own:
// the document gives only the function, the widths and the reuse factor.
module mma_layer #(
  parameter int N_IN  = 128,
  parameter int N_OUT = 128,
  parameter int REUSE = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      w_we,
  input  logic [$clog2(N_IN)-1:0]   w_idx,
  input  logic signed [7:0]         w_col [N_OUT],
  input  logic                      b_we,
  input  logic signed [31:0]        b_vec [N_OUT],
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [7:0]         x [N_IN],
  output logic                      out_valid,
  output logic signed [31:0]        y [N_OUT]
);
  localparam int MPC = N_IN / REUSE;  // input elements per cycle
  localparam int CW  = $clog2(REUSE);

  logic signed [7:0]  wmem [N_IN][N_OUT];
  logic signed [31:0] bias [N_OUT];
  logic signed [7:0]  xq   [N_IN];
  logic signed [31:0] acc  [N_OUT];
  logic               busy;
  logic [CW-1:0]      cnt;

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_idx] <= w_col;
    if (b_we) bias <= b_vec;
  end

  assign in_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          cnt  <= '0;
        end
      end else if (cnt == CW'(REUSE - 1)) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // Datapath: load, then REUSE accumulation steps; the last one writes y.
  always_ff @(posedge clk) begin
    if (!busy) begin
      if (in_valid) begin
        xq  <= x;
        acc <= bias;
      end
    end else begin
      for (int j = 0; j < N_OUT; j++) begin
        logic signed [31:0] s;
        s = acc[j];
        for (int t = 0; t < MPC; t++)
          s = s + 32'(wmem[int'(cnt) * MPC + t][j]) * 32'(xq[int'(cnt) * MPC + t]);
        acc[j] <= s;
        if (cnt == CW'(REUSE - 1)) y[j] <= s;
      end
    end
  end

  initial assert (N_IN % REUSE == 0) else $error("N_IN must be a multiple of REUSE");
endmodule
