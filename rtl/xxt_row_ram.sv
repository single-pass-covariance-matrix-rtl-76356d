// xxt_row_ram: upper-triangle storage of XX^T for the semi-parallel engine.
//
// The storage is organised by rows of XX^T: one address selects row i, and a
// word is the whole row, N entries wide, so that the engine can add a full row
// of products per cycle. Because XX^T is symmetric only entries j >= i exist:
// column j is a RAM of depth j+1 (rows 0..j), N(N+1)/2 entries in all. Rows
// of XX^T in RAM blocks and the upper-triangle rule follow the original design; the
// column-sliced layout and the asynchronous read are own choices.
//
// Interface: addr_i selects the row for read and write. rdata_o is the row,
// read combinationally (entries below the diagonal read as zero). In the
// clock edge, every column j with we_mask_i[j] set and j >= addr_i takes
// wdata_i[j]. A read-modify-write of one row therefore takes one cycle. There
// is no reset: the engine overwrites every entry it later reads.
module xxt_row_ram #(
  parameter int unsigned N      = cov_pkg::MAX_DIM_DEF,
  parameter int unsigned ACC_W  = cov_pkg::ACC_W_DEF,
  localparam int unsigned AW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic [AW-1:0]            addr_i,
  input  logic [N-1:0]             we_mask_i,
  input  logic [N-1:0][ACC_W-1:0]  wdata_i,
  output logic [N-1:0][ACC_W-1:0]  rdata_o
);

  for (genvar j = 0; j < N; j++) begin : g_col
    localparam int unsigned LW = (j > 0) ? $clog2(j + 1) : 1;
    logic [ACC_W-1:0] mem [j+1];
    logic [LW-1:0]    la;
    logic             hit;

    assign hit = (32'(addr_i) <= j);
    assign la  = LW'(addr_i);

    always_ff @(posedge clk) begin
      if (we_mask_i[j] && hit) mem[la] <= wdata_i[j];
    end

    assign rdata_o[j] = hit ? mem[la] : '0;
  end

endmodule
