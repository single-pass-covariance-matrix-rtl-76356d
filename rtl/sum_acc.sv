// sum_acc: per-dimension sum accumulator, the X1 (X times a vector of ones)
// term of the covariance decomposition.
//
// Each time add_i is high, every value k < dims_i of the presented sample is
// sign-extended and added to its running sum; all N sums are updated in
// parallel in one cycle, as in the original design.
// clear_i zeroes all sums. overflow_o is sticky: it rises when a signed
// addition wraps and stays high until clear_i (the original design names accumulator
// overflow as what limits the sample count; flagging it is an own choice).
// Read port: rd_data_o is the sum selected by rd_idx_i, combinationally.
module sum_acc #(
  parameter int unsigned N       = cov_pkg::MAX_DIM_DEF,
  parameter int unsigned DATA_W  = cov_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W   = cov_pkg::ACC_W_DEF,
  localparam int unsigned DIM_W  = $clog2(N + 1),
  localparam int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear_i,
  input  logic                      add_i,
  input  logic [DIM_W-1:0]          dims_i,
  input  logic [N-1:0][DATA_W-1:0]  vals_i,
  input  logic [IDX_W-1:0]          rd_idx_i,
  output logic [ACC_W-1:0]          rd_data_o,
  output logic                      overflow_o
);

  logic [N-1:0][ACC_W-1:0] sum_q;
  logic [N-1:0][ACC_W-1:0] sum_d;
  logic [N-1:0]            ovf;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic [ACC_W-1:0] ext;
      ext      = ACC_W'(signed'(vals_i[k]));
      sum_d[k] = sum_q[k] + ext;
      ovf[k]   = add_i && (k < 32'(dims_i)) &&
                 (sum_q[k][ACC_W-1] == ext[ACC_W-1]) &&
                 (sum_d[k][ACC_W-1] != ext[ACC_W-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q      <= '0;
      overflow_o <= 1'b0;
    end else if (clear_i) begin
      sum_q      <= '0;
      overflow_o <= 1'b0;
    end else if (add_i) begin
      for (int k = 0; k < N; k++)
        if (k < 32'(dims_i)) sum_q[k] <= sum_d[k];
      if (|ovf) overflow_o <= 1'b1;
    end
  end

  assign rd_data_o = (32'(rd_idx_i) < N) ? sum_q[rd_idx_i] : '0;

endmodule
