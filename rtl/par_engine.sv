// par_engine: fully parallel computation engine, used while the sample fits
// one cache line (dims <= PAR_DIM).
//
// Every unordered pair (i,j), i <= j < PAR_DIM, of the sample has its own
// multiplier (a DSP block on the FPGA), so the whole tensor product
// x^T (x) x of one sample, the upper triangle of it, is formed in one cycle.
// The products are registered (the DSP output register) and in the next cycle
// added to the XX^T accumulators, one register per stored entry; entries with
// i or j >= dims_i are left alone. Alongside, the sample values are added to
// the X1 sums (sum_acc). Only the upper triangle is kept since XX^T is
// symmetric; the original design describes this engine and the storage rule, the
// two-stage pipeline and register-based storage are own choices.
//
// Interface: s_valid_i/s_ready_o take a sample from the receive module;
// s_ready_o is always high (one sample per cycle). acc_done_o pulses when a
// sample has been added to XX^T. clear_i zeroes all accumulators. overflow_o
// is sticky: a signed accumulator addition wrapped. Read port (combinational):
// rd_xxt_o = XX^T(rd_row_i, rd_col_i) (either order), rd_sum_o = X1(rd_sum_idx_i).
//
// Timing: throughput one sample per cycle; XX^T includes a sample two cycles
// after it was taken, the sums one cycle after.
module par_engine #(
  parameter int unsigned PAR_DIM = cov_pkg::CL_W_DEF / cov_pkg::DATA_W_DEF,
  parameter int unsigned DATA_W  = cov_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W   = cov_pkg::ACC_W_DEF,
  localparam int unsigned DIM_W  = $clog2(PAR_DIM + 1),
  localparam int unsigned IDX_W  = (PAR_DIM > 1) ? $clog2(PAR_DIM) : 1,
  localparam int unsigned NTRI   = PAR_DIM * (PAR_DIM + 1) / 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear_i,
  input  logic [DIM_W-1:0]                dims_i,
  input  logic                            s_valid_i,
  output logic                            s_ready_o,
  input  logic [PAR_DIM-1:0][DATA_W-1:0]  sample_i,
  output logic                            acc_done_o,
  output logic                            busy_o,
  output logic                            overflow_o,
  input  logic [IDX_W-1:0]                rd_row_i,
  input  logic [IDX_W-1:0]                rd_col_i,
  input  logic [IDX_W-1:0]                rd_sum_idx_i,
  output logic [ACC_W-1:0]                rd_xxt_o,
  output logic [ACC_W-1:0]                rd_sum_o
);

  localparam int unsigned PROD_W = 2 * DATA_W;

  logic                    take;
  logic [NTRI-1:0][PROD_W-1:0] prod_q;   // DSP output registers
  logic                    pvalid_q;
  logic [NTRI-1:0]         pmask_q;      // entry lies inside dims x dims
  logic [NTRI-1:0][ACC_W-1:0] acc_q;
  logic [NTRI-1:0]         ovf;
  logic                    xxt_ovf_q, sum_ovf;

  assign s_ready_o = 1'b1;
  assign take      = s_valid_i;

  // One multiplier and one accumulator per stored entry.
  for (genvar i = 0; i < PAR_DIM; i++) begin : g_row
    for (genvar j = i; j < PAR_DIM; j++) begin : g_col
      localparam int unsigned T = cov_pkg::tri_idx(PAR_DIM, i, j);
      logic [ACC_W-1:0] ext, nxt;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          prod_q[T]  <= '0;
          pmask_q[T] <= 1'b0;
        end else if (take) begin
          prod_q[T]  <= PROD_W'($signed(sample_i[i]) * $signed(sample_i[j]));
          pmask_q[T] <= (j < 32'(dims_i));
        end
      end

      assign ext    = ACC_W'($signed(prod_q[T]));
      assign nxt    = acc_q[T] + ext;
      assign ovf[T] = pvalid_q && pmask_q[T] && (acc_q[T][ACC_W-1] == ext[ACC_W-1]) &&
                      (nxt[ACC_W-1] != ext[ACC_W-1]);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                      acc_q[T] <= '0;
        else if (clear_i)                acc_q[T] <= '0;
        else if (pvalid_q && pmask_q[T]) acc_q[T] <= nxt;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pvalid_q  <= 1'b0;
      xxt_ovf_q <= 1'b0;
    end else if (clear_i) begin
      pvalid_q  <= 1'b0;
      xxt_ovf_q <= 1'b0;
    end else begin
      pvalid_q <= take;
      if (|ovf) xxt_ovf_q <= 1'b1;
    end
  end

  sum_acc #(.N(PAR_DIM), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_sum (
    .clk, .rst_n, .clear_i,
    .add_i     (take),
    .dims_i    (dims_i),
    .vals_i    (sample_i),
    .rd_idx_i  (rd_sum_idx_i),
    .rd_data_o (rd_sum_o),
    .overflow_o(sum_ovf)
  );

  assign acc_done_o = pvalid_q;
  assign busy_o     = pvalid_q;
  assign overflow_o = xxt_ovf_q | sum_ovf;

  // Symmetric read: XX^T(r,c) = XX^T(c,r).
  always_comb begin
    int unsigned r, c;
    r = (rd_row_i <= rd_col_i) ? 32'(rd_row_i) : 32'(rd_col_i);
    c = (rd_row_i <= rd_col_i) ? 32'(rd_col_i) : 32'(rd_row_i);
    rd_xxt_o = (c < PAR_DIM) ? acc_q[cov_pkg::tri_idx(PAR_DIM, r, c)] : '0;
  end

endmodule
