// tb_par_engine: self-checking test of the fully parallel engine at its
// default size (16 dimensions, 32-bit samples, 64-bit accumulators).
// Jobs of random signed samples with different dimension counts are fed with
// random gaps and back to back; afterwards every XX^T entry (read in both
// index orders) and every sum is compared with a reference computed in the
// testbench. It checks one sample per cycle and the acc_done latency, that
// clear_i restarts from zero, and that the overflow flag rises only for a job
// built to wrap the accumulators.
module tb_par_engine;
  localparam int PAR_DIM = 16, DATA_W = 32, ACC_W = 64;
  localparam int DIM_W = $clog2(PAR_DIM + 1), IDX_W = $clog2(PAR_DIM);
  logic clk = 0, rst_n = 0, clear = 0;
  logic [DIM_W-1:0] dims;
  logic s_valid, s_ready, acc_done, busy, ovf;
  logic [PAR_DIM-1:0][DATA_W-1:0] sample;
  logic [IDX_W-1:0] rd_row, rd_col, rd_sum_idx;
  logic [ACC_W-1:0] rd_xxt, rd_sum;
  int checks = 0, failures = 0, done_cnt = 0, cyc = 0;
  longint ref_xxt [PAR_DIM][PAR_DIM];
  longint ref_sum [PAR_DIM];

  par_engine #(.PAR_DIM(PAR_DIM), .DATA_W(DATA_W), .ACC_W(ACC_W)) dut (
    .clk, .rst_n, .clear_i(clear), .dims_i(dims), .s_valid_i(s_valid), .s_ready_o(s_ready),
    .sample_i(sample), .acc_done_o(acc_done), .busy_o(busy), .overflow_o(ovf),
    .rd_row_i(rd_row), .rd_col_i(rd_col), .rd_sum_idx_i(rd_sum_idx), .rd_xxt_o(rd_xxt), .rd_sum_o(rd_sum));

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (acc_done) done_cnt++; end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_job(int d);
    @(negedge clk);
    dims = DIM_W'(d); clear = 1;
    @(negedge clk); clear = 0;
    foreach (ref_xxt[i, j]) ref_xxt[i][j] = 0;
    foreach (ref_sum[i]) ref_sum[i] = 0;
    done_cnt = 0;
  endtask

  task automatic feed(int n, bit gaps, bit extreme);
    for (int s = 0; s < n; s++) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(0, 1) == 0) begin s_valid = 0; @(negedge clk); end
      for (int k = 0; k < PAR_DIM; k++) sample[k] = extreme ? 32'h8000_0000 : 32'($signed(28'($urandom)));  // |x| < 2^27 keeps 64 samples in range
      s_valid = 1;
      checks++;
      if (!s_ready) begin failures++; $display("FAIL not ready"); end
      for (int i = 0; i < int'(dims); i++) begin
        ref_sum[i] += longint'($signed(sample[i]));
        for (int j = 0; j < int'(dims); j++)
          ref_xxt[i][j] += longint'($signed(sample[i])) * longint'($signed(sample[j]));
      end
    end
    @(negedge clk); s_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic check_all(int n);
    checks++;
    if (done_cnt != n) begin failures++; $display("FAIL acc_done count %0d exp %0d", done_cnt, n); end
    for (int i = 0; i < int'(dims); i++) begin
      rd_sum_idx = IDX_W'(i); #1;
      checks++;
      if (rd_sum !== ACC_W'(ref_sum[i])) begin failures++; $display("FAIL sum[%0d]", i); end
      for (int j = 0; j < int'(dims); j++) begin
        rd_row = IDX_W'(i); rd_col = IDX_W'(j); #1;
        checks++;
        if (rd_xxt !== ACC_W'(ref_xxt[i][j])) begin
          failures++; $display("FAIL xxt(%0d,%0d) got %h exp %h", i, j, rd_xxt, ref_xxt[i][j]);
        end
      end
    end
  endtask

  initial begin
    int c0;
    s_valid = 0; sample = '0; dims = 16; rd_row = 0; rd_col = 0; rd_sum_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    new_job(16); feed(50, 1, 0); check_all(50);
    checks++; if (ovf) begin failures++; $display("FAIL spurious overflow"); end
    new_job(7);  feed(30, 1, 0); check_all(30);
    new_job(1);  feed(10, 0, 0); check_all(10);
    // back to back: n samples in n cycles, acc_done two cycles after each take
    new_job(12);
    c0 = cyc;
    fork
      feed(64, 0, 0);
      begin
        @(posedge clk iff acc_done);
        checks++;
        if (cyc - c0 != 2) begin failures++; $display("FAIL first acc_done after %0d cycles", cyc - c0); end
        @(posedge clk iff !acc_done);
        checks++;
        if (cyc - c0 != 2 + 64) begin failures++; $display("FAIL 64 samples took %0d cycles", cyc - c0 - 2); end
      end
    join
    check_all(64);
    // accumulator overflow: (-2^31)^2 = 2^62, two of them wrap a signed 64-bit sum
    new_job(4); feed(2, 0, 1);
    checks++; if (!ovf) begin failures++; $display("FAIL overflow not flagged"); end
    new_job(4);
    checks++; if (ovf) begin failures++; $display("FAIL overflow not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
