// tb_mma_layer: matrix-vector multiply at full size (128 x 128, reuse 64).
//
// Random int8 weights (written column by column through the weight port),
// random 32-bit biases and three random int8 vectors, one of them with the
// extreme values -128 and 127 throughout. Every result element is compared
// with a product computed here, the latency must be 65 cycles from
// acceptance to out_valid, in_ready must be low while a vector is in flight
// and a vector offered then must be ignored.
//
// Source: int8 inputs, 32-bit accumulation and reuse factor 64 follow the
// paper; the stimuli are this design's own.
module tb_mma_layer;
  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  logic w_we = 0, b_we = 0, in_valid = 0, in_ready, out_valid;
  logic [6:0] w_idx;
  logic signed [7:0]  w_col [N];
  logic signed [31:0] b_vec [N];
  logic signed [7:0]  x [N];
  logic signed [31:0] y [N];
  logic signed [7:0]  wm [N][N];
  int checks = 0, failures = 0, cycle = 0, lat, blocked = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  mma_layer dut (.clk, .rst_n, .w_we, .w_idx, .w_col, .b_we, .b_vec,
                 .in_valid, .in_ready, .x, .out_valid, .y);

  task automatic run_vector(int kind);
    logic signed [31:0] exp_y [N];
    for (int i = 0; i < N; i++)
      x[i] = (kind == 1) ? ((i % 2) ? 8'sd127 : -8'sd128) : 8'($urandom);
    for (int j = 0; j < N; j++) begin
      exp_y[j] = b_vec[j];
      for (int i = 0; i < N; i++) exp_y[j] += 32'(wm[i][j]) * 32'(x[i]);
    end
    checks++;
    if (!in_ready) begin failures++; $display("not ready before a vector"); end
    in_valid = 1;
    @(posedge clk);  // acceptance edge
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
      if (lat == 1) begin
        // Offer another vector while busy: it must be ignored.
        for (int i = 0; i < N; i++) x[i] = 8'sd1;
        checks++;
        if (in_ready) begin failures++; $display("ready while busy"); end else blocked++;
      end
      if (lat == 2) in_valid = 0;
    end while (!out_valid && lat < 200);
    checks++;
    if (lat != 65) begin
      failures++; $display("latency %0d cycles, expected 65", lat);
    end
    #1;
    for (int j = 0; j < N; j++) begin
      checks++;
      if (y[j] !== exp_y[j]) begin
        failures++;
        if (failures < 10) $display("y[%0d]=%0d expected %0d", j, y[j], exp_y[j]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        wm[i][j] = 8'($urandom);
        if (i == 5) wm[i][j] = -8'sd128;
        w_col[j] = wm[i][j];
      end
      w_we = 1; w_idx = 7'(i);
      @(negedge clk);
    end
    w_we = 0;
    for (int j = 0; j < N; j++) b_vec[j] = 32'($urandom) >>> 4;
    b_we = 1;
    @(negedge clk);
    b_we = 0;
    run_vector(0);
    run_vector(1);
    run_vector(0);
    $display("vectors refused while busy: %0d", blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
