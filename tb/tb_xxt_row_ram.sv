// tb_xxt_row_ram: self-checking test of the upper-triangle row storage.
// Writes random rows with random column masks, keeps a full reference matrix
// in the testbench and checks every row read: stored entries return the last
// written value, entries below the diagonal read as zero and are never
// written, and a read-modify-write of one row completes in one cycle.
module tb_xxt_row_ram;
  localparam int N = 9, ACC_W = 32;
  localparam int AW = $clog2(N);
  logic clk = 0;
  logic [AW-1:0] addr;
  logic [N-1:0] we;
  logic [N-1:0][ACC_W-1:0] wdata, rdata;
  logic [ACC_W-1:0] ref_m [N][N];
  int checks = 0, failures = 0;

  xxt_row_ram #(.N(N), .ACC_W(ACC_W)) dut (.clk, .addr_i(addr), .we_mask_i(we), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(int r);
    addr = AW'(r); we = '0;
    #1;
    for (int c = 0; c < N; c++) begin
      checks++;
      if (rdata[c] !== (c >= r ? ref_m[r][c] : '0)) begin
        failures++;
        $display("FAIL (%0d,%0d) got %h exp %h", r, c, rdata[c], (c >= r ? ref_m[r][c] : '0));
      end
    end
  endtask

  initial begin
    addr = 0; we = '0; wdata = '0;
    // fill every stored entry once
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      addr = AW'(r); we = '1;
      for (int c = 0; c < N; c++) begin
        wdata[c] = $urandom;
        if (c >= r) ref_m[r][c] = wdata[c];
      end
    end
    @(negedge clk); we = '0;
    for (int r = 0; r < N; r++) check_row(r);
    // random partial writes, then read-modify-write increments
    for (int t = 0; t < 200; t++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, N-1);
      addr = AW'(r);
      we = N'($urandom);
      for (int c = 0; c < N; c++) begin
        wdata[c] = $urandom;
        if (we[c] && c >= r) ref_m[r][c] = wdata[c];
      end
    end
    @(negedge clk); we = '0;
    for (int r = 0; r < N; r++) check_row(r);
    for (int t = 0; t < 50; t++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, N-1);
      addr = AW'(r); we = '1;
      #1;
      for (int c = 0; c < N; c++) begin
        wdata[c] = rdata[c] + 32'd7;
        if (c >= r) ref_m[r][c] = ref_m[r][c] + 32'd7;
      end
    end
    @(negedge clk); we = '0;
    for (int r = 0; r < N; r++) check_row(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
