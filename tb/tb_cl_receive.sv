// tb_cl_receive: self-checking test of the receive module.
// For several dimension counts (one-line and multi-line samples, at and above
// the one-line threshold) it packs random samples into lines, fills unused
// lanes with garbage, and drives them with random gaps while the engines
// apply random back-pressure. Every sample taken by an engine is compared with
// the expected one (unused positions must be zero), the engine choice is
// checked against the threshold, sample_done pulses are counted, and with no
// gaps and no back-pressure one-line samples must pass at one per cycle.
module tb_cl_receive;
  localparam int CL_W = 128, DATA_W = 32, MAX_DIM = 10;
  localparam int LANES = CL_W / DATA_W;
  localparam int DIM_W = $clog2(MAX_DIM + 1);
  logic clk = 0, rst_n = 0, clear = 0, enable = 0;
  logic [DIM_W-1:0] dims;
  logic [CL_W-1:0] line;
  logic line_valid, line_ready;
  logic [MAX_DIM-1:0][DATA_W-1:0] sample;
  logic use_par, par_valid, par_ready, semi_valid, semi_ready, sample_done;
  int checks = 0, failures = 0;
  logic [MAX_DIM-1:0][DATA_W-1:0] exp_q [$];
  logic [CL_W-1:0] line_q [$];
  int taken_cnt, done_cnt;
  bit gaps, bp;

  cl_receive #(.CL_W(CL_W), .DATA_W(DATA_W), .MAX_DIM(MAX_DIM)) dut (
    .clk, .rst_n, .clear_i(clear), .enable_i(enable), .dims_i(dims),
    .line_i(line), .line_valid_i(line_valid), .line_ready_o(line_ready),
    .sample_o(sample), .use_par_o(use_par), .par_valid_o(par_valid), .par_ready_i(par_ready),
    .semi_valid_o(semi_valid), .semi_ready_i(semi_ready), .sample_done_o(sample_done));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line source
  always_ff @(posedge clk) begin
    if (line_valid && line_ready) void'(line_q.pop_front());
  end
  logic gate;
  always @(negedge clk) begin
    gate       = gaps && ($urandom_range(0, 2) == 0);
    line_valid = enable && (line_q.size() > 0) && !gate;
    line       = (line_q.size() > 0) ? line_q[0] : '0;
    par_ready  = !bp || ($urandom_range(0, 1) == 0);
    semi_ready = !bp || ($urandom_range(0, 1) == 0);
  end

  // sample sink / checker
  always @(posedge clk) begin
    if ((par_valid && par_ready) || (semi_valid && semi_ready)) begin
      taken_cnt++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected sample");
      end else begin
        logic [MAX_DIM-1:0][DATA_W-1:0] e;
        e = exp_q.pop_front();
        if (sample !== e) begin failures++; $display("FAIL sample %h exp %h", sample, e); end
      end
      checks++;
      if (par_valid !== (int'(dims) <= LANES) || semi_valid !== (int'(dims) > LANES)) begin
        failures++; $display("FAIL engine choice dims=%0d par=%0b semi=%0b", dims, par_valid, semi_valid);
      end
    end
    if (sample_done) done_cnt++;
  end

  task automatic run(int d, int n, bit g, bit b);
    int nl;
    @(negedge clk);
    dims = DIM_W'(d); gaps = g; bp = b;
    clear = 1; @(negedge clk); clear = 0;
    taken_cnt = 0; done_cnt = 0;
    nl = (d + LANES - 1) / LANES;
    for (int s = 0; s < n; s++) begin
      logic [MAX_DIM-1:0][DATA_W-1:0] e;
      e = '0;
      for (int l = 0; l < nl; l++) begin
        logic [CL_W-1:0] ln;
        for (int k = 0; k < LANES; k++) begin
          ln[k*DATA_W +: DATA_W] = $urandom;
          if (l*LANES + k < d) e[l*LANES + k] = ln[k*DATA_W +: DATA_W];
        end
        line_q.push_back(ln);
      end
      exp_q.push_back(e);
    end
    enable = 1;
    while (taken_cnt < n) @(negedge clk);
    enable = 0;
    checks++;
    if (done_cnt != n) begin failures++; $display("FAIL done pulses %0d exp %0d", done_cnt, n); end
  endtask

  initial begin
    int t0;
    line_valid = 0; line = '0; dims = 1; gaps = 0; bp = 0; gate = 0;
    par_ready = 1; semi_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 20, 1, 1);
    run(4, 20, 1, 1);   // exactly at the threshold: still the parallel engine
    run(5, 20, 1, 1);
    run(10, 20, 1, 1);
    run(1, 10, 0, 0);
    // rate: one-line samples, no gaps, no back-pressure -> one per cycle
    t0 = $time;
    run(2, 40, 0, 0);
    checks++;
    // 40 lines plus clear, first-offer and loop-detection cycles
    if (($time - t0) / 10 > 40 + 4) begin
      failures++; $display("FAIL rate: %0d cycles for 40 one-line samples", ($time - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
