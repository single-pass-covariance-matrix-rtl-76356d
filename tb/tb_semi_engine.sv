// tb_semi_engine: self-checking test of the semi-parallel engine (reduced to
// 40 dimensions to keep the run short). Jobs of random signed samples with
// dimension counts above and below the one-line threshold are fed with random
// gaps and back to back; afterwards every XX^T entry (both index orders) and
// every sum is compared with a reference computed in the testbench. A job
// following a larger one checks that nothing of the previous job survives
// (first-sample overwrite instead of clearing). With samples back to back the
// engine must take exactly one sample every dims cycles and report each one
// dims+1 cycles after it was taken. A job built to wrap the accumulators must
// raise the overflow flag.
module tb_semi_engine;
  localparam int MAX_DIM = 40, DATA_W = 32, ACC_W = 64;
  localparam int DIM_W = $clog2(MAX_DIM + 1), IDX_W = $clog2(MAX_DIM);
  logic clk = 0, rst_n = 0, clear = 0;
  logic [DIM_W-1:0] dims;
  logic s_valid, s_ready, acc_done, busy, ovf;
  logic [MAX_DIM-1:0][DATA_W-1:0] sample;
  logic [IDX_W-1:0] rd_row, rd_col, rd_sum_idx;
  logic [ACC_W-1:0] rd_xxt, rd_sum;
  int checks = 0, failures = 0, done_cnt = 0, cyc = 0;
  int take_cyc [$];
  int done_cyc [$];
  longint ref_xxt [MAX_DIM][MAX_DIM];
  longint ref_sum [MAX_DIM];

  semi_engine #(.MAX_DIM(MAX_DIM), .DATA_W(DATA_W), .ACC_W(ACC_W)) dut (
    .clk, .rst_n, .clear_i(clear), .dims_i(dims), .s_valid_i(s_valid), .s_ready_o(s_ready),
    .sample_i(sample), .acc_done_o(acc_done), .busy_o(busy), .overflow_o(ovf),
    .rd_row_i(rd_row), .rd_col_i(rd_col), .rd_sum_idx_i(rd_sum_idx), .rd_xxt_o(rd_xxt), .rd_sum_o(rd_sum));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (acc_done) begin done_cnt++; done_cyc.push_back(cyc); end
    if (s_valid && s_ready) take_cyc.push_back(cyc);
  end
  initial begin
    repeat (100000) @(posedge clk);
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
    done_cnt = 0; take_cyc.delete(); done_cyc.delete();
  endtask

  task automatic feed(int n, bit gaps, bit extreme);
    for (int s = 0; s < n; s++) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(0, 2) == 0) begin s_valid = 0; @(negedge clk); end
      for (int k = 0; k < MAX_DIM; k++) sample[k] = extreme ? 32'h8000_0000 : 32'($signed(28'($urandom)));
      s_valid = 1;
      #1;
      while (!s_ready) begin @(negedge clk); #1; end
      for (int i = 0; i < int'(dims); i++) begin
        ref_sum[i] += longint'($signed(sample[i]));
        for (int j = 0; j < int'(dims); j++)
          ref_xxt[i][j] += longint'($signed(sample[i])) * longint'($signed(sample[j]));
      end
    end
    @(negedge clk); s_valid = 0;
    while (busy) @(negedge clk);
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

  task automatic check_rate(int d);
    for (int s = 1; s < take_cyc.size(); s++) begin
      checks++;
      if (take_cyc[s] - take_cyc[s-1] != d) begin
        failures++; $display("FAIL samples %0d cycles apart, exp %0d", take_cyc[s] - take_cyc[s-1], d);
      end
    end
    for (int s = 0; s < take_cyc.size() && s < done_cyc.size(); s++) begin
      checks++;
      if (done_cyc[s] - take_cyc[s] != d + 1) begin
        failures++; $display("FAIL acc_done %0d cycles after take, exp %0d", done_cyc[s] - take_cyc[s], d + 1);
      end
    end
  endtask

  initial begin
    s_valid = 0; sample = '0; dims = 40; rd_row = 0; rd_col = 0; rd_sum_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    new_job(40); feed(20, 1, 0); check_all(20);
    checks++; if (ovf) begin failures++; $display("FAIL spurious overflow"); end
    new_job(23); feed(15, 0, 0); check_all(15); check_rate(23);
    new_job(17); feed(12, 1, 0); check_all(12);
    new_job(3);  feed(10, 0, 0); check_all(10); check_rate(3);
    new_job(33); feed(8, 0, 0);  check_all(8);  check_rate(33);
    new_job(18); feed(2, 0, 1);
    checks++; if (!ovf) begin failures++; $display("FAIL overflow not flagged"); end
    new_job(18);
    checks++; if (ovf) begin failures++; $display("FAIL overflow not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
