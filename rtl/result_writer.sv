// result_writer: sends the accumulated moments to the host after the pass.
//
// The host finishes the covariance matrix in floating point,
//     K(i,j) = ( XX^T(i,j) - X1(i)*X1(j)/n ) / n,
// so the accelerator only has to hand over X1 and the upper triangle of XX^T.
// The writer reads one accumulator per cycle through the engines' read port
// and packs WPL = CL_W/ACC_W of them into a cache line. Line layout (own
// choice, the original design only says the matrices go to the CPU): first the dims
// sums X1(0..dims-1), padded with zeros to a whole line; then XX^T row by row,
// upper triangle only, (0,0),(0,1)..(0,dims-1),(1,1)..(dims-1,dims-1), packed
// continuously and zero-padded in the last line. Within a line, word w sits in
// bits [w*ACC_W +: ACC_W].
//
// Interface: start_i (one cycle, with dims_i stable) begins a transfer; the
// read port rd_* addresses the engine, whose data comes back combinationally
// on rd_xxt_i / rd_sum_i. out_* is a valid/ready stream; out_last_o marks the
// final line. done_o pulses when the final line has been accepted.
//
// Timing: one accumulator per cycle plus one cycle per emitted line, and as
// many waiting cycles as out_ready_i is low.
module result_writer #(
  parameter int unsigned CL_W    = cov_pkg::CL_W_DEF,
  parameter int unsigned ACC_W   = cov_pkg::ACC_W_DEF,
  parameter int unsigned MAX_DIM = cov_pkg::MAX_DIM_DEF,
  localparam int unsigned DIM_W  = $clog2(MAX_DIM + 1),
  localparam int unsigned IDX_W  = (MAX_DIM > 1) ? $clog2(MAX_DIM) : 1,
  localparam int unsigned WPL    = CL_W / ACC_W,
  localparam int unsigned WC_W   = (WPL > 1) ? $clog2(WPL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  logic [DIM_W-1:0]     dims_i,
  output logic [IDX_W-1:0]     rd_row_o,
  output logic [IDX_W-1:0]     rd_col_o,
  output logic [IDX_W-1:0]     rd_sum_idx_o,
  input  logic [ACC_W-1:0]     rd_xxt_i,
  input  logic [ACC_W-1:0]     rd_sum_i,
  output logic [CL_W-1:0]      out_line_o,
  output logic                 out_valid_o,
  input  logic                 out_ready_i,
  output logic                 out_last_o,
  output logic                 busy_o,
  output logic                 done_o
);

  typedef enum logic [1:0] {W_IDLE, W_SUMS, W_TRI, W_EMIT} wstate_e;

  wstate_e                   state_q, after_q;
  logic [IDX_W-1:0]          idx_q, row_q, col_q;
  logic [WC_W-1:0]           wc_q;
  logic [WPL-1:0][ACC_W-1:0] line_q;
  logic                      last_q;
  logic                      line_full, sums_end, tri_end;
  logic [ACC_W-1:0]          word;

  assign rd_sum_idx_o = idx_q;
  assign rd_row_o     = row_q;
  assign rd_col_o     = col_q;
  assign line_full    = (32'(wc_q) == WPL - 1);
  assign sums_end     = (32'(idx_q) == 32'(dims_i) - 1);
  assign tri_end      = (32'(row_q) == 32'(dims_i) - 1);   // (dims-1, dims-1) is the last entry
  assign word         = (state_q == W_SUMS) ? rd_sum_i : rd_xxt_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= W_IDLE;
      after_q <= W_IDLE;
      idx_q   <= '0;
      row_q   <= '0;
      col_q   <= '0;
      wc_q    <= '0;
      line_q  <= '0;
      last_q  <= 1'b0;
    end else begin
      unique case (state_q)
        W_IDLE: if (start_i) begin
          state_q <= W_SUMS;
          idx_q   <= '0;
          row_q   <= '0;
          col_q   <= '0;
          wc_q    <= '0;
          line_q  <= '0;
          last_q  <= 1'b0;
        end
        W_SUMS, W_TRI: begin
          line_q[wc_q] <= word;
          wc_q         <= wc_q + 1'b1;
          if (state_q == W_SUMS) begin
            idx_q <= idx_q + 1'b1;
            if (sums_end || line_full) begin
              state_q <= W_EMIT;
              after_q <= sums_end ? W_TRI : W_SUMS;
            end
          end else begin
            if (32'(col_q) == 32'(dims_i) - 1) begin
              row_q <= row_q + 1'b1;
              col_q <= row_q + 1'b1;
            end else begin
              col_q <= col_q + 1'b1;
            end
            if (tri_end || line_full) begin
              state_q <= W_EMIT;
              after_q <= W_TRI;
              last_q  <= tri_end;
            end
          end
        end
        W_EMIT: if (out_ready_i) begin
          line_q  <= '0;
          wc_q    <= '0;
          state_q <= last_q ? W_IDLE : after_q;
        end
        default: state_q <= W_IDLE;
      endcase
    end
  end

  assign out_line_o  = line_q;
  assign out_valid_o = (state_q == W_EMIT);
  assign out_last_o  = (state_q == W_EMIT) && last_q;
  assign busy_o      = (state_q != W_IDLE);
  assign done_o      = out_valid_o && out_ready_i && last_q;

  // The line must not change while it is offered.
  property p_line_stable;
    @(posedge clk) disable iff (!rst_n) (out_valid_o && !out_ready_i) |=> (out_valid_o && $stable(out_line_o));
  endproperty
  assert property (p_line_stable);

endmodule
