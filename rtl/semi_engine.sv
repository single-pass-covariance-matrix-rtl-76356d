// semi_engine: semi-parallel computation engine, used when the sample is wider
// than one cache line (dims > threshold).
//
// A taken sample is copied twice: into the operand buffer opnd_q, which stays
// put, and into the duplicated buffer shreg_q, which shifts one position per
// cycle towards element 0, the multiplier register. In cycle i the multiplier
// register holds x_i and MAX_DIM multipliers (DSPs) form x_i * x_j for every
// j at once: row i of the sample's tensor product. The products are registered
// and, one cycle later, added to row i of XX^T in xxt_row_ram with a one-cycle
// read-modify-write; only columns i <= j < dims_i are written (upper
// triangle). A sample thus takes dims_i cycles, so time grows linearly with
// dimensionality as the original design states. The sample values are added to the
// X1 sums (sum_acc) when the sample is taken. The shift-into-multiplier scheme
// follows the original design; the two-stage pipeline and the clearing scheme are own
// choices: instead of a clearing pass over the RAM, the first sample of a job
// writes its products without adding the old contents.
//
// Interface: s_valid_i/s_ready_o take a sample; s_ready_o is high when idle or
// in the last row cycle of the current sample, so samples follow each other
// without gaps. acc_done_o pulses when the last row of a sample has been
// accumulated. clear_i starts a new job. overflow_o is sticky. Read port
// (combinational, valid while busy_o is low): rd_xxt_o = XX^T(rd_row_i,
// rd_col_i) in either order, rd_sum_o = X1(rd_sum_idx_i).
//
// Timing: a sample taken in cycle t has its rows multiplied in cycles
// t+1..t+dims and accumulated one cycle later each; acc_done_o pulses in cycle
// t+dims+1.
module semi_engine #(
  parameter int unsigned MAX_DIM = cov_pkg::MAX_DIM_DEF,
  parameter int unsigned DATA_W  = cov_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W   = cov_pkg::ACC_W_DEF,
  localparam int unsigned DIM_W  = $clog2(MAX_DIM + 1),
  localparam int unsigned IDX_W  = (MAX_DIM > 1) ? $clog2(MAX_DIM) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear_i,
  input  logic [DIM_W-1:0]                dims_i,
  input  logic                            s_valid_i,
  output logic                            s_ready_o,
  input  logic [MAX_DIM-1:0][DATA_W-1:0]  sample_i,
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

  // stage 1: shifting and multiplication
  logic [MAX_DIM-1:0][DATA_W-1:0] opnd_q;    // buffer
  logic [MAX_DIM-1:0][DATA_W-1:0] shreg_q;   // duplicated buffer, [0] = multiplier register
  logic                           mul_busy_q;
  logic [IDX_W-1:0]               row_q;
  logic                           first_q;   // the current sample is the job's first
  logic                           job_first_q;
  logic                           last_row, take;

  // stage 2: accumulation
  logic [MAX_DIM-1:0][PROD_W-1:0] prod_q;
  logic                           pvalid_q, plast_q, pfirst_q;
  logic [IDX_W-1:0]               prow_q;

  logic [MAX_DIM-1:0][ACC_W-1:0]  ram_rdata, ram_wdata;
  logic [MAX_DIM-1:0]             ram_we;
  logic [IDX_W-1:0]               ram_addr;
  logic [MAX_DIM-1:0]             ovf;
  logic                           xxt_ovf_q, sum_ovf;
  logic [IDX_W-1:0]               rd_r, rd_c;

  assign last_row  = mul_busy_q && (32'(row_q) == 32'(dims_i) - 1);
  assign s_ready_o = !mul_busy_q || last_row;
  assign take      = s_valid_i && s_ready_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opnd_q      <= '0;
      shreg_q     <= '0;
      mul_busy_q  <= 1'b0;
      row_q       <= '0;
      first_q     <= 1'b0;
      job_first_q <= 1'b1;
    end else if (clear_i) begin
      mul_busy_q  <= 1'b0;
      row_q       <= '0;
      job_first_q <= 1'b1;
    end else begin
      if (take) begin
        opnd_q      <= sample_i;
        shreg_q     <= sample_i;
        mul_busy_q  <= 1'b1;
        row_q       <= '0;
        first_q     <= job_first_q;
        job_first_q <= 1'b0;
      end else if (mul_busy_q) begin
        shreg_q    <= shreg_q >> DATA_W;   // shift the next value into the multiplier register
        row_q      <= row_q + 1'b1;
        if (last_row) mul_busy_q <= 1'b0;
      end
    end
  end

  // The DSP row: multiplier register times every buffer element.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q   <= '0;
      pvalid_q <= 1'b0;
      plast_q  <= 1'b0;
      pfirst_q <= 1'b0;
      prow_q   <= '0;
    end else if (clear_i) begin
      pvalid_q <= 1'b0;
      plast_q  <= 1'b0;
    end else begin
      pvalid_q <= mul_busy_q;
      plast_q  <= last_row;
      pfirst_q <= first_q;
      prow_q   <= row_q;
      if (mul_busy_q)
        for (int j = 0; j < MAX_DIM; j++)
          prod_q[j] <= PROD_W'($signed(shreg_q[0]) * $signed(opnd_q[j]));
    end
  end

  // Row read-modify-write.
  always_comb begin
    for (int j = 0; j < MAX_DIM; j++) begin
      logic [ACC_W-1:0] ext, old;
      ext          = ACC_W'($signed(prod_q[j]));
      old          = pfirst_q ? '0 : ram_rdata[j];
      ram_wdata[j] = old + ext;
      ram_we[j]    = pvalid_q && (j >= 32'(prow_q)) && (j < 32'(dims_i));
      ovf[j]       = ram_we[j] && (old[ACC_W-1] == ext[ACC_W-1]) &&
                     (ram_wdata[j][ACC_W-1] != ext[ACC_W-1]);
    end
  end

  assign rd_r     = (rd_row_i <= rd_col_i) ? rd_row_i : rd_col_i;
  assign rd_c     = (rd_row_i <= rd_col_i) ? rd_col_i : rd_row_i;
  assign ram_addr = pvalid_q ? prow_q : rd_r;

  xxt_row_ram #(.N(MAX_DIM), .ACC_W(ACC_W)) u_ram (
    .clk,
    .addr_i   (ram_addr),
    .we_mask_i(ram_we),
    .wdata_i  (ram_wdata),
    .rdata_o  (ram_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       xxt_ovf_q <= 1'b0;
    else if (clear_i) xxt_ovf_q <= 1'b0;
    else if (|ovf)    xxt_ovf_q <= 1'b1;
  end

  sum_acc #(.N(MAX_DIM), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_sum (
    .clk, .rst_n, .clear_i,
    .add_i     (take),
    .dims_i    (dims_i),
    .vals_i    (sample_i),
    .rd_idx_i  (rd_sum_idx_i),
    .rd_data_o (rd_sum_o),
    .overflow_o(sum_ovf)
  );

  assign acc_done_o = pvalid_q && plast_q;
  assign busy_o     = mul_busy_q || pvalid_q;
  assign overflow_o = xxt_ovf_q | sum_ovf;
  assign rd_xxt_o   = (32'(rd_c) < MAX_DIM) ? ram_rdata[rd_c] : '0;

endmodule
