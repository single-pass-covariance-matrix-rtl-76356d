// cov_top: single-pass covariance matrix accelerator (FPGA part of a hybrid
// FPGA/CPU system).
//
// The covariance matrix of m data sets with n samples each is decomposed as
//     K = ( XX^T - (X1)(X1)^T / n ) / n,
// where X is the m x n data matrix and X1 the vector of row sums. Both XX^T
// (a sum over samples of the tensor product x^T (x) x) and X1 can be built up
// sample by sample, so the data is read only once. This top module does that
// accumulation and hands XX^T (upper triangle) and X1 to the host, which does
// the divisions in floating point.
//
// Data path: cache lines from the host -> cl_receive (assembles a sample and
// picks the engine by dimensionality) -> par_engine when dims <= LANES (all
// pair products of a sample in one cycle) or semi_engine otherwise (one row of
// products per cycle, dims cycles per sample) -> result_writer streams X1 and
// XX^T back as cache lines. cov_ctrl sequences a job. The split into a
// receive module, two engines chosen by dimensionality, upper-triangle row
// storage and host-side division follows the original design; widths, handshakes
// and the result line format are own choices.
//
// Usage: set cfg_dims_i (1..MAX_DIM) and cfg_samples_i (n >= 1) and pulse
// start_i. Send n samples on in_*: each sample is ceil(dims/LANES) lines, value
// k in bits [(k%LANES)*DATA_W +: DATA_W] of line k/LANES, signed. Then take
// the result lines from out_* (layout: see result_writer) until out_last_o;
// done_o then stays high. cfg_error_o reports a refused configuration,
// overflow_o a wrapped accumulator in the job, semi_mode_o which engine runs.
//
// Timing: up to dims <= LANES one sample (one line) per cycle; above it, dims
// cycles per sample.
module cov_top #(
  parameter int unsigned CL_W    = cov_pkg::CL_W_DEF,
  parameter int unsigned DATA_W  = cov_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W   = cov_pkg::ACC_W_DEF,
  parameter int unsigned MAX_DIM = cov_pkg::MAX_DIM_DEF,
  parameter int unsigned CNT_W   = cov_pkg::CNT_W_DEF,
  localparam int unsigned LANES  = CL_W / DATA_W,
  localparam int unsigned DIM_W  = $clog2(MAX_DIM + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // job configuration and status
  input  logic              start_i,
  input  logic [DIM_W-1:0]  cfg_dims_i,
  input  logic [CNT_W-1:0]  cfg_samples_i,
  output logic              busy_o,
  output logic              done_o,
  output logic              cfg_error_o,
  output logic              overflow_o,
  output logic              semi_mode_o,
  output logic [CNT_W-1:0]  acc_count_o,    // samples accumulated in this job
  // samples from the host, one cache line per beat
  input  logic [CL_W-1:0]   in_line_i,
  input  logic              in_valid_i,
  output logic              in_ready_o,
  // results to the host
  output logic [CL_W-1:0]   out_line_o,
  output logic              out_valid_o,
  input  logic              out_ready_i,
  output logic              out_last_o
);

  localparam int unsigned IDX_W   = (MAX_DIM > 1) ? $clog2(MAX_DIM) : 1;
  localparam int unsigned PAR_DIM = (LANES < MAX_DIM) ? LANES : MAX_DIM;
  localparam int unsigned PDIM_W  = $clog2(PAR_DIM + 1);
  localparam int unsigned PIDX_W  = (PAR_DIM > 1) ? $clog2(PAR_DIM) : 1;

  logic [DIM_W-1:0]               dims;
  logic                           clear, rx_enable, rx_sample, wr_start, wr_done;
  logic [MAX_DIM-1:0][DATA_W-1:0] sample;
  logic                           use_par;
  logic                           par_valid, par_ready, semi_valid, semi_ready;
  logic                           par_done, semi_done, par_busy, semi_busy;
  logic                           par_ovf, semi_ovf;
  logic [IDX_W-1:0]               rd_row, rd_col, rd_sum_idx;
  logic [ACC_W-1:0]               par_xxt, par_sum, semi_xxt, semi_sum;
  logic                           wr_busy;

  cov_ctrl #(.MAX_DIM(MAX_DIM), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n,
    .start_i      (start_i),
    .cfg_dims_i   (cfg_dims_i),
    .cfg_samples_i(cfg_samples_i),
    .rx_sample_i  (rx_sample),
    .acc_done_i   (par_done | semi_done),
    .wr_done_i    (wr_done),
    .dims_o       (dims),
    .clear_o      (clear),
    .rx_enable_o  (rx_enable),
    .wr_start_o   (wr_start),
    .busy_o       (busy_o),
    .done_o       (done_o),
    .cfg_error_o  (cfg_error_o),
    .acc_count_o  (acc_count_o)
  );

  cl_receive #(.CL_W(CL_W), .DATA_W(DATA_W), .MAX_DIM(MAX_DIM)) u_rx (
    .clk, .rst_n,
    .clear_i      (clear),
    .enable_i     (rx_enable),
    .dims_i       (dims),
    .line_i       (in_line_i),
    .line_valid_i (in_valid_i),
    .line_ready_o (in_ready_o),
    .sample_o     (sample),
    .use_par_o    (use_par),
    .par_valid_o  (par_valid),
    .par_ready_i  (par_ready),
    .semi_valid_o (semi_valid),
    .semi_ready_i (semi_ready),
    .sample_done_o(rx_sample)
  );

  par_engine #(.PAR_DIM(PAR_DIM), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_par (
    .clk, .rst_n,
    .clear_i      (clear),
    .dims_i       (PDIM_W'(use_par ? dims : '0)),
    .s_valid_i    (par_valid),
    .s_ready_o    (par_ready),
    .sample_i     (sample[PAR_DIM-1:0]),
    .acc_done_o   (par_done),
    .busy_o       (par_busy),
    .overflow_o   (par_ovf),
    .rd_row_i     (PIDX_W'(rd_row)),
    .rd_col_i     (PIDX_W'(rd_col)),
    .rd_sum_idx_i (PIDX_W'(rd_sum_idx)),
    .rd_xxt_o     (par_xxt),
    .rd_sum_o     (par_sum)
  );

  semi_engine #(.MAX_DIM(MAX_DIM), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_semi (
    .clk, .rst_n,
    .clear_i      (clear),
    .dims_i       (dims),
    .s_valid_i    (semi_valid),
    .s_ready_o    (semi_ready),
    .sample_i     (sample),
    .acc_done_o   (semi_done),
    .busy_o       (semi_busy),
    .overflow_o   (semi_ovf),
    .rd_row_i     (rd_row),
    .rd_col_i     (rd_col),
    .rd_sum_idx_i (rd_sum_idx),
    .rd_xxt_o     (semi_xxt),
    .rd_sum_o     (semi_sum)
  );

  result_writer #(.CL_W(CL_W), .ACC_W(ACC_W), .MAX_DIM(MAX_DIM)) u_wr (
    .clk, .rst_n,
    .start_i      (wr_start),
    .dims_i       (dims),
    .rd_row_o     (rd_row),
    .rd_col_o     (rd_col),
    .rd_sum_idx_o (rd_sum_idx),
    .rd_xxt_i     (use_par ? par_xxt : semi_xxt),
    .rd_sum_i     (use_par ? par_sum : semi_sum),
    .out_line_o   (out_line_o),
    .out_valid_o  (out_valid_o),
    .out_ready_i  (out_ready_i),
    .out_last_o   (out_last_o),
    .busy_o       (wr_busy),
    .done_o       (wr_done)
  );

  // Size rules: whole values per line, whole accumulators per result line,
  // and accumulators wide enough for a full product.
  if (CL_W % DATA_W != 0 || CL_W % ACC_W != 0 || ACC_W < 2 * DATA_W) begin : g_size_check
    $error("cov_top: CL_W must be a multiple of DATA_W and ACC_W, and ACC_W >= 2*DATA_W");
  end

  assign overflow_o  = par_ovf | semi_ovf;
  assign semi_mode_o = !use_par;

  // The engines are idle whenever results are read out.
  property p_idle_readout;
    @(posedge clk) disable iff (!rst_n) wr_busy |-> !(par_busy || semi_busy);
  endproperty
  assert property (p_idle_readout);

endmodule
