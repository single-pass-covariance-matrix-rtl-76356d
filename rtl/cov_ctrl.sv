// cov_ctrl: job controller of the covariance accelerator.
//
// A job is one pass over n samples of dims dimensions. On start_i the
// configuration is checked (1 <= dims <= MAX_DIM, n >= 1) and latched; an
// invalid one is refused with cfg_error_o and the controller stays idle. A
// valid job clears all accumulators for one cycle, then lets the receive
// module take exactly n samples (rx_enable_o drops after the n-th sample's
// last line) while counting the samples the active engine has accumulated.
// Once all n are in XX^T, the result transfer to the host is started, and
// done_o rises when it has finished, staying high until the next start. That
// results go to the host only after accumulation is complete follows the
// document; the rest of the sequencing is an own choice.
//
// States: IDLE -> CLEAR -> RUN -> WRITE -> DONE (-> CLEAR on a new start).
module cov_ctrl #(
  parameter int unsigned MAX_DIM = cov_pkg::MAX_DIM_DEF,
  parameter int unsigned CNT_W   = cov_pkg::CNT_W_DEF,
  localparam int unsigned DIM_W  = $clog2(MAX_DIM + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [DIM_W-1:0]  cfg_dims_i,
  input  logic [CNT_W-1:0]  cfg_samples_i,
  input  logic              rx_sample_i,    // receive module completed a sample
  input  logic              acc_done_i,     // engine accumulated a sample
  input  logic              wr_done_i,      // result transfer finished
  output logic [DIM_W-1:0]  dims_o,
  output logic              clear_o,
  output logic              rx_enable_o,
  output logic              wr_start_o,
  output logic              busy_o,
  output logic              done_o,
  output logic              cfg_error_o,
  output logic [CNT_W-1:0]  acc_count_o
);

  typedef enum logic [2:0] {C_IDLE, C_CLEAR, C_RUN, C_WRITE, C_DONE} cstate_e;

  cstate_e          state_q;
  logic [CNT_W-1:0] samples_q, rx_cnt_q, acc_cnt_q;
  logic             cfg_ok;
  logic             wr_busy_q;    // writer already started in this WRITE phase

  assign cfg_ok = (cfg_dims_i != '0) && (32'(cfg_dims_i) <= MAX_DIM) && (cfg_samples_i != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= C_IDLE;
      dims_o      <= '0;
      samples_q   <= '0;
      rx_cnt_q    <= '0;
      acc_cnt_q   <= '0;
      cfg_error_o <= 1'b0;
    end else begin
      unique case (state_q)
        C_IDLE, C_DONE: if (start_i) begin
          if (cfg_ok) begin
            state_q     <= C_CLEAR;
            dims_o      <= cfg_dims_i;
            samples_q   <= cfg_samples_i;
            cfg_error_o <= 1'b0;
          end else begin
            cfg_error_o <= 1'b1;
          end
        end
        C_CLEAR: begin
          rx_cnt_q  <= '0;
          acc_cnt_q <= '0;
          state_q   <= C_RUN;
        end
        C_RUN: begin
          if (rx_sample_i) rx_cnt_q <= rx_cnt_q + 1'b1;
          if (acc_done_i) begin
            acc_cnt_q <= acc_cnt_q + 1'b1;
            if (acc_cnt_q + 1'b1 == samples_q) state_q <= C_WRITE;
          end
        end
        C_WRITE: if (wr_done_i) state_q <= C_DONE;
        default: state_q <= C_IDLE;
      endcase
    end
  end

  assign clear_o     = (state_q == C_CLEAR);
  assign rx_enable_o = (state_q == C_RUN) && (rx_cnt_q != samples_q);
  // The writer is started in the cycle after the last accumulation.
  assign wr_start_o  = (state_q == C_WRITE) && !wr_busy_q;
  assign busy_o      = (state_q == C_CLEAR) || (state_q == C_RUN) || (state_q == C_WRITE);
  assign done_o      = (state_q == C_DONE);
  assign acc_count_o = acc_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  wr_busy_q <= 1'b0;
    else if (state_q != C_WRITE) wr_busy_q <= 1'b0;
    else                         wr_busy_q <= 1'b1;
  end

endmodule
