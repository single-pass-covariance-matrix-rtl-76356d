// tb_sum_acc: self-checking test of the per-dimension sum accumulator.
// Adds random signed samples with a random active dimension count, compares
// every sum with a reference kept in the testbench, checks that dimensions at
// or beyond dims_i are left alone, that clear_i zeroes the sums, and that the
// sticky overflow flag rises exactly when a signed addition wraps.
module tb_sum_acc;
  localparam int N = 8, DATA_W = 16, ACC_W = 24;
  logic clk = 0, rst_n = 0, clear = 0, add = 0;
  logic [$clog2(N+1)-1:0] dims;
  logic [N-1:0][DATA_W-1:0] vals;
  logic [$clog2(N)-1:0] rd_idx;
  logic [ACC_W-1:0] rd_data;
  logic ovf;
  int checks = 0, failures = 0, cyc = 0;
  longint ref_sum [N];
  bit ref_ovf;

  sum_acc #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) dut (
    .clk, .rst_n, .clear_i(clear), .add_i(add), .dims_i(dims), .vals_i(vals),
    .rd_idx_i(rd_idx), .rd_data_o(rd_data), .overflow_o(ovf));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < N; k++) begin
      rd_idx = k[$clog2(N)-1:0];
      #1;
      checks++;
      if (rd_data !== ACC_W'(ref_sum[k])) begin
        failures++;
        $display("FAIL sum[%0d] got %0d exp %0d", k, rd_data, ACC_W'(ref_sum[k]));
      end
    end
    checks++;
    if (ovf !== ref_ovf) begin failures++; $display("FAIL overflow %0b exp %0b", ovf, ref_ovf); end
  endtask

  task automatic add_sample(int amp, bit pos = 0);
    longint v, s;
    for (int k = 0; k < N; k++) vals[k] = pos ? DATA_W'($urandom_range(amp - 2000, amp)) : DATA_W'($urandom_range(0, 2*amp) - amp);
    @(negedge clk);
    add = 1;
    for (int k = 0; k < int'(dims); k++) begin
      v = longint'($signed(vals[k]));
      s = ref_sum[k] + v;
      // wrap into ACC_W bits, as the hardware does
      s = (s << (64 - ACC_W)) >>> (64 - ACC_W);
      if ((ref_sum[k] < 0) == (v < 0) && (s < 0) != (v < 0)) ref_ovf = 1;
      ref_sum[k] = s;
    end
    @(negedge clk);
    add = 0;
  endtask

  initial begin
    dims = 5; vals = '0; rd_idx = 0;
    foreach (ref_sum[k]) ref_sum[k] = 0;
    ref_ovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int t = 0; t < 40; t++) begin
      dims = ($urandom_range(1, N));
      add_sample(1000);
    end
    check_all();
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (ref_sum[k]) ref_sum[k] = 0;
    ref_ovf = 0;
    check_all();
    // drive towards overflow with large values
    dims = N;
    for (int t = 0; t < 300; t++) add_sample(32000, 1);
    check_all();
    checks++;
    if (!ref_ovf) begin failures++; $display("FAIL test did not reach an overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
