// tb_cov_ctrl: self-checking test of the job controller.
// Checks that invalid configurations (no dimensions, too many, no samples)
// are refused, that a valid start clears the accumulators for exactly one
// cycle and latches dims, that exactly n samples are admitted by the receive
// enable, that the writer is started once only after the n-th accumulation,
// that done follows the writer and holds until the next start, and that a
// second job runs the same way.
module tb_cov_ctrl;
  localparam int MAX_DIM = 160, CNT_W = 40;
  localparam int DIM_W = $clog2(MAX_DIM + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [DIM_W-1:0] cfg_dims, dims;
  logic [CNT_W-1:0] cfg_samples, acc_count;
  logic rx_sample = 0, acc_done = 0, wr_done = 0;
  logic clear, rx_enable, wr_start, busy, done, cfg_error;
  int checks = 0, failures = 0, clear_cnt = 0, wr_start_cnt = 0;

  cov_ctrl #(.MAX_DIM(MAX_DIM), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .start_i(start), .cfg_dims_i(cfg_dims), .cfg_samples_i(cfg_samples),
    .rx_sample_i(rx_sample), .acc_done_i(acc_done), .wr_done_i(wr_done),
    .dims_o(dims), .clear_o(clear), .rx_enable_o(rx_enable), .wr_start_o(wr_start),
    .busy_o(busy), .done_o(done), .cfg_error_o(cfg_error), .acc_count_o(acc_count));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (clear) clear_cnt++;
    if (wr_start) wr_start_cnt++;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_start(int d, longint n);
    @(negedge clk);
    cfg_dims = DIM_W'(d); cfg_samples = CNT_W'(n); start = 1;
    @(negedge clk); start = 0;
  endtask

  task automatic job(int d, int n);
    int admitted;
    clear_cnt = 0; wr_start_cnt = 0;
    pulse_start(d, n);
    expect_(!cfg_error, "valid config refused");
    expect_(dims == DIM_W'(d), "dims not latched");
    @(negedge clk);
    expect_(clear_cnt == 1, "clear not exactly one cycle");
    // receive completes samples while enabled
    admitted = 0;
    while (rx_enable) begin
      rx_sample = 1; admitted++;
      @(negedge clk);
      rx_sample = 0;
      @(negedge clk);
    end
    expect_(admitted == n, "receive enable admitted the wrong number of samples");
    // engine accumulates them
    for (int s = 0; s < n; s++) begin
      expect_(wr_start_cnt == 0, "writer started early");
      acc_done = 1; @(negedge clk); acc_done = 0;
      if (s % 3 == 0) @(negedge clk);
    end
    expect_(acc_count == CNT_W'(n), "accumulated count wrong");
    repeat (5) @(negedge clk);
    expect_(wr_start_cnt == 1, "writer not started exactly once");
    expect_(busy && !done, "not busy while writing");
    wr_done = 1; @(negedge clk); wr_done = 0;
    expect_(done && !busy, "done missing after the transfer");
    repeat (5) @(negedge clk);
    expect_(done, "done not held");
  endtask

  initial begin
    cfg_dims = 0; cfg_samples = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pulse_start(0, 5);          expect_(cfg_error && !busy, "dims=0 accepted");
    pulse_start(MAX_DIM + 1, 5); expect_(cfg_error && !busy, "dims>MAX accepted");
    pulse_start(8, 0);          expect_(cfg_error && !busy, "n=0 accepted");
    job(8, 7);
    job(MAX_DIM, 4);
    job(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
