// cl_receive: receive module of the covariance accelerator.
//
// Samples arrive one after another, each packed into ceil(dims/LANES)
// cache lines (LANES = CL_W/DATA_W values per line, value k of a sample in
// lane k%LANES of line k/LANES). A sample always starts on a fresh line, so for
// few dimensions most of each line stays unused, as in the original design. The
// module writes each accepted line into the sample buffer; when the last line
// of a sample has been accepted the buffer is offered to one of the two
// computation engines: the fully parallel engine when dims <= LANES (the
// threshold of one cache line), otherwise the semi-parallel engine. The
// dimension-based dispatch follows the original design; the line layout, the zeroing
// of buffer entries at or beyond dims and the handshakes are own choices.
//
// Interface: line_* is a valid/ready stream accepted only while enable_i is
// high. par_* and semi_* are valid/ready sample handshakes; the buffer is
// presented on sample_o and held until the selected engine takes it.
// sample_done_o pulses in the cycle the last line of a sample is accepted.
// clear_i empties the buffer and restarts line counting (start of a job).
//
// Timing: one line per cycle. A new line is accepted in the same cycle the
// previous full sample is taken, so a one-line sample passes every cycle; the
// sample is offered the cycle after its last line was accepted.
module cl_receive #(
  parameter int unsigned CL_W    = cov_pkg::CL_W_DEF,
  parameter int unsigned DATA_W  = cov_pkg::DATA_W_DEF,
  parameter int unsigned MAX_DIM = cov_pkg::MAX_DIM_DEF,
  localparam int unsigned LANES  = CL_W / DATA_W,
  localparam int unsigned DIM_W  = $clog2(MAX_DIM + 1),
  localparam int unsigned NLINES = (MAX_DIM + LANES - 1) / LANES,
  localparam int unsigned LN_W   = (NLINES > 1) ? $clog2(NLINES) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear_i,
  input  logic                            enable_i,
  input  logic [DIM_W-1:0]                dims_i,
  // cache line stream from the host
  input  logic [CL_W-1:0]                 line_i,
  input  logic                            line_valid_i,
  output logic                            line_ready_o,
  // assembled sample towards the engines
  output logic [MAX_DIM-1:0][DATA_W-1:0]  sample_o,
  output logic                            use_par_o,
  output logic                            par_valid_o,
  input  logic                            par_ready_i,
  output logic                            semi_valid_o,
  input  logic                            semi_ready_i,
  output logic                            sample_done_o
);

  logic [MAX_DIM-1:0][DATA_W-1:0] buf_q;
  logic                           full_q;     // a complete sample is waiting
  logic [LN_W-1:0]                line_idx_q; // line of the current sample
  logic [LN_W-1:0]                last_line;
  logic                           taken, accept, last_accept;

  assign use_par_o    = (dims_i <= DIM_W'(LANES));
  assign last_line    = LN_W'((32'(dims_i) + LANES - 1) / LANES - 1);
  assign taken        = full_q && (use_par_o ? par_ready_i : semi_ready_i);
  assign line_ready_o = enable_i && (!full_q || taken);
  assign accept       = line_valid_i && line_ready_o;
  assign last_accept  = accept && (line_idx_q == last_line);

  assign sample_o      = buf_q;
  assign par_valid_o   = full_q && use_par_o;
  assign semi_valid_o  = full_q && !use_par_o;
  assign sample_done_o = last_accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q      <= '0;
      full_q     <= 1'b0;
      line_idx_q <= '0;
    end else if (clear_i) begin
      buf_q      <= '0;
      full_q     <= 1'b0;
      line_idx_q <= '0;
    end else begin
      if (accept) begin
        for (int p = 0; p < MAX_DIM; p++) begin
          if (LN_W'(p / LANES) == line_idx_q)
            buf_q[p] <= (p < 32'(dims_i)) ? line_i[(p % LANES)*DATA_W +: DATA_W] : '0;
        end
        line_idx_q <= last_accept ? '0 : line_idx_q + 1'b1;
      end
      if (last_accept)
        full_q <= 1'b1;
      else if (taken)
        full_q <= 1'b0;
    end
  end

  // A complete sample stays offered until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n || clear_i) (full_q && !taken) |=> full_q;
  endproperty
  assert property (p_hold);

endmodule
