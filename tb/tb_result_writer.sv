// tb_result_writer: self-checking test of the result transfer.
// A behavioural stand-in for the engines' read port returns a distinct value
// for every sum and XX^T entry (and flags any read below the diagonal). For
// several dimension counts the testbench collects the output lines under
// random back-pressure and compares them with the expected layout: the sums
// zero-padded to whole lines, then the upper triangle row by row, zero-padded
// at the end, out_last on the final line only and one done pulse.
module tb_result_writer;
  localparam int CL_W = 256, ACC_W = 64, MAX_DIM = 11;
  localparam int WPL = CL_W / ACC_W;
  localparam int DIM_W = $clog2(MAX_DIM + 1), IDX_W = $clog2(MAX_DIM);
  logic clk = 0, rst_n = 0, start = 0;
  logic [DIM_W-1:0] dims;
  logic [IDX_W-1:0] rd_row, rd_col, rd_sum_idx;
  logic [ACC_W-1:0] rd_xxt, rd_sum;
  logic [CL_W-1:0] out_line;
  logic out_valid, out_ready, out_last, busy, done;
  int checks = 0, failures = 0, done_cnt = 0;
  logic [CL_W-1:0] got [$];
  bit bad_read;

  result_writer #(.CL_W(CL_W), .ACC_W(ACC_W), .MAX_DIM(MAX_DIM)) dut (
    .clk, .rst_n, .start_i(start), .dims_i(dims), .rd_row_o(rd_row), .rd_col_o(rd_col),
    .rd_sum_idx_o(rd_sum_idx), .rd_xxt_i(rd_xxt), .rd_sum_i(rd_sum),
    .out_line_o(out_line), .out_valid_o(out_valid), .out_ready_i(out_ready), .out_last_o(out_last),
    .busy_o(busy), .done_o(done));

  // stand-in for the accumulators
  assign rd_sum = 64'hA000_0000_0000_0000 | 64'(rd_sum_idx);
  assign rd_xxt = 64'hB000_0000_0000_0000 | (64'(rd_row) << 16) | 64'(rd_col);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) got.push_back(out_line);
    if (done) done_cnt++;
    if (busy && !out_valid && rd_row > rd_col) bad_read = 1;
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int d);
    logic [ACC_W-1:0] words [$];
    int nl;
    got.delete(); done_cnt = 0; bad_read = 0;
    @(negedge clk); dims = DIM_W'(d); start = 1;
    @(negedge clk); start = 0;
    // expected stream
    for (int k = 0; k < d; k++) words.push_back(64'hA000_0000_0000_0000 | 64'(k));
    while (words.size() % WPL != 0) words.push_back('0);
    for (int i = 0; i < d; i++)
      for (int j = i; j < d; j++) words.push_back(64'hB000_0000_0000_0000 | (64'(i) << 16) | 64'(j));
    while (words.size() % WPL != 0) words.push_back('0);
    nl = words.size() / WPL;
    forever begin
      @(posedge clk);
      if (out_valid && out_ready && out_last) break;
    end
    @(negedge clk);
    checks++;
    if (got.size() != nl) begin failures++; $display("FAIL dims=%0d: %0d lines, exp %0d", d, got.size(), nl); end
    for (int l = 0; l < got.size() && l < nl; l++)
      for (int w = 0; w < WPL; w++) begin
        checks++;
        if (got[l][w*ACC_W +: ACC_W] !== words[l*WPL + w]) begin
          failures++; $display("FAIL dims=%0d line %0d word %0d: %h exp %h", d, l, w, got[l][w*ACC_W +: ACC_W], words[l*WPL + w]);
        end
      end
    checks++;
    if (done_cnt != 1 || busy) begin failures++; $display("FAIL done pulses %0d busy %0b", done_cnt, busy); end
    checks++;
    if (bad_read) begin failures++; $display("FAIL read below the diagonal"); end
  endtask

  // out_last must only come with the final line
  int last_cnt;
  always @(posedge clk) if (rst_n && out_valid && out_ready && out_last) last_cnt++;

  initial begin
    dims = 1; out_ready = 1; last_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1); run(4); run(5); run(11); run(8);
    checks++;
    if (last_cnt != 5) begin failures++; $display("FAIL %0d last lines for 5 transfers", last_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
