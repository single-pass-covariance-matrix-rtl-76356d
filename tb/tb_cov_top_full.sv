// tb_cov_top_full: end-to-end self-checking test of the covariance accelerator with every parameter at its default (512-bit lines, 32-bit samples, 64-bit accumulators, up to 160 dimensions).
//
// A host model packs random signed samples into cache lines, runs jobs
// through cov_top and collects the result lines. For each job it checks the
// transferred sums and upper triangle of XX^T against a reference, then does
// the host's part, K = (XX^T - X1 X1^T / n) / n in floating point, and
// compares K with a conventional two-pass covariance of the same data. It also
// checks the sample count, the overflow flag and the accumulation rate: one
// sample per cycle for the parallel engine, one every dims cycles for the
// semi-parallel engine. Every mechanism of the design must occur at least
// once: both engines, the threshold case, multi-line samples, input stalls,
// output back-pressure and a refused configuration.
module tb_cov_top_full;
  localparam int CL_W    = 512;
  localparam int DATA_W  = 32;
  localparam int ACC_W   = 64;
  localparam int MAX_DIM = 160;
  localparam int CNT_W   = 40;
  localparam int LANES   = CL_W / DATA_W;
  localparam int WPL     = CL_W / ACC_W;
  localparam int DIM_W   = $clog2(MAX_DIM + 1);
  localparam int NMAX    = 80;

  logic clk = 0, rst_n = 0, start = 0;
  logic [DIM_W-1:0] cfg_dims;
  logic [CNT_W-1:0] cfg_samples, acc_count;
  logic busy, done, cfg_error, overflow, semi_mode;
  logic [CL_W-1:0] in_line, out_line;
  logic in_valid, in_ready, out_valid, out_ready, out_last;

  cov_top dut (
    .clk, .rst_n, .start_i(start), .cfg_dims_i(cfg_dims), .cfg_samples_i(cfg_samples),
    .busy_o(busy), .done_o(done), .cfg_error_o(cfg_error), .overflow_o(overflow),
    .semi_mode_o(semi_mode), .acc_count_o(acc_count),
    .in_line_i(in_line), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .out_line_o(out_line), .out_valid_o(out_valid), .out_ready_i(out_ready), .out_last_o(out_last));

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_par_jobs = 0, n_semi_jobs = 0, n_threshold = 0, n_multiline = 0;
  int n_in_stall = 0, n_out_bp = 0, n_overflow = 0, n_cfg_error = 0;

  logic [CL_W-1:0] line_q [$];
  logic [CL_W-1:0] got [$];
  int acc_cyc [$];
  bit in_gaps, out_bp, gate, ogate;
  logic [CNT_W-1:0] last_acc_count;
  logic signed [DATA_W-1:0] x [NMAX][MAX_DIM];

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host side of the input stream
  // stimulus changes on the falling edge, transfers happen on the rising edge
  always @(negedge clk) begin
    gate      = in_gaps && ($urandom_range(0, 3) == 0);
    ogate     = out_bp && ($urandom_range(0, 2) == 0);
    in_valid  = (line_q.size() > 0) && !gate;
    in_line   = (line_q.size() > 0) ? line_q[0] : '0;
    out_ready = !ogate;
  end
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) void'(line_q.pop_front());
    if (in_valid && !in_ready && busy) n_in_stall++;
    if (out_valid && !out_ready) n_out_bp++;
    if (out_valid && out_ready) got.push_back(out_line);
    if (acc_count == last_acc_count + 1'b1 && busy) acc_cyc.push_back(cyc);
    last_acc_count <= acc_count;
  end

  task automatic expect_(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // kind 0: small random values, 1: values that must wrap the accumulators
  task automatic job(int d, int n, int kind, bit gaps, bit bp);
    int nl, amp;
    logic [ACC_W-1:0] words [$];
    longint a [MAX_DIM][MAX_DIM];
    longint s [MAX_DIM];
    real mean [MAX_DIM];
    bit semi_seen;
    amp = 1 << (DATA_W - 6);
    for (int t = 0; t < n; t++)
      for (int k = 0; k < d; k++)
        x[t][k] = (kind == 1) ? DATA_W'((1 << (DATA_W - 1)) - 1)
                              : DATA_W'(int'($urandom_range(0, 2 * amp)) - amp);
    // pack into lines; unused lanes carry garbage
    nl = (d + LANES - 1) / LANES;
    line_q.delete(); got.delete(); acc_cyc.delete();
    for (int t = 0; t < n; t++)
      for (int l = 0; l < nl; l++) begin
        logic [CL_W-1:0] ln;
        for (int k = 0; k < LANES; k++)
          ln[k*DATA_W +: DATA_W] = (l*LANES + k < d) ? x[t][l*LANES + k] : DATA_W'($urandom);
        line_q.push_back(ln);
      end
    in_gaps = gaps; out_bp = bp;
    @(negedge clk);
    cfg_dims = DIM_W'(d); cfg_samples = CNT_W'(n); start = 1;
    @(negedge clk); start = 0;
    semi_seen = 0;
    while (!done) begin
      if (busy) semi_seen = semi_seen | semi_mode;
      @(negedge clk);
    end
    // reference moments, wrapped to the accumulator width
    for (int i = 0; i < d; i++) begin
      s[i] = 0;
      for (int t = 0; t < n; t++) s[i] += longint'(x[t][i]);
      for (int j = 0; j < d; j++) begin
        a[i][j] = 0;
        for (int t = 0; t < n; t++) a[i][j] += longint'(x[t][i]) * longint'(x[t][j]);
      end
    end
    for (int k = 0; k < d; k++) words.push_back(ACC_W'(s[k]));
    while (words.size() % WPL != 0) words.push_back('0);
    for (int i = 0; i < d; i++) for (int j = i; j < d; j++) words.push_back(ACC_W'(a[i][j]));
    while (words.size() % WPL != 0) words.push_back('0);
    expect_(got.size() == words.size() / WPL, $sformatf("dims=%0d: %0d result lines, exp %0d", d, got.size(), words.size() / WPL));
    for (int l = 0; l < got.size() && l < words.size() / WPL; l++)
      for (int w = 0; w < WPL; w++)
        expect_(got[l][w*ACC_W +: ACC_W] == words[l*WPL + w],
                $sformatf("dims=%0d line %0d word %0d: %h exp %h", d, l, w, got[l][w*ACC_W +: ACC_W], words[l*WPL + w]));
    expect_(acc_count == CNT_W'(n), "accumulated sample count");
    expect_(semi_seen == (d > LANES), $sformatf("engine choice for dims=%0d", d));
    expect_(overflow == (kind == 1), $sformatf("overflow flag %0b for kind %0d", overflow, kind));
    expect_(line_q.size() == 0, "not all input lines consumed");
    if (kind == 0) begin
      // the host's division step against a two-pass covariance
      for (int i = 0; i < d; i++) begin
        mean[i] = 0;
        for (int t = 0; t < n; t++) mean[i] += real'(x[t][i]);
        mean[i] /= n;
      end
      for (int i = 0; i < d; i++)
        for (int j = i; j < d; j++) begin
          real kref, khw, xi, xj, sij;
          int p;
          kref = 0;
          for (int t = 0; t < n; t++) kref += (real'(x[t][i]) - mean[i]) * (real'(x[t][j]) - mean[j]);
          kref /= n;
          p = 0;
          for (int r = 0; r < i; r++) p += d - r;
          p += j - i;
          xi  = real'($signed(got[0 + i / WPL][(i % WPL)*ACC_W +: ACC_W]));
          xj  = real'($signed(got[0 + j / WPL][(j % WPL)*ACC_W +: ACC_W]));
          begin
            int base = (d + WPL - 1) / WPL;
            sij = real'($signed(got[base + p / WPL][(p % WPL)*ACC_W +: ACC_W]));
          end
          khw = (sij - xi * xj / n) / n;
          expect_((khw - kref) < 1e-6 * (1.0 + (kref < 0 ? -kref : kref)) &&
                  (kref - khw) < 1e-6 * (1.0 + (kref < 0 ? -kref : kref)),
                  $sformatf("K(%0d,%0d) = %f, two-pass %f", i, j, khw, kref));
        end
    end
    // accumulation rate without input gaps
    if (!gaps)
      for (int t = 1; t < acc_cyc.size(); t++)
        expect_(acc_cyc[t] - acc_cyc[t-1] == ((d > LANES) ? d : 1),
                $sformatf("dims=%0d: samples %0d cycles apart", d, acc_cyc[t] - acc_cyc[t-1]));
    if (d > LANES) n_semi_jobs++; else n_par_jobs++;
    if (d == LANES) n_threshold++;
    if (d > LANES) n_multiline++;
    if (overflow) n_overflow++;
  endtask

  initial begin
    cfg_dims = 0; cfg_samples = 0; in_valid = 0; in_line = '0; out_ready = 1; in_gaps = 0; out_bp = 0; gate = 0; ogate = 0;
    last_acc_count = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // a refused configuration
    @(negedge clk); cfg_dims = '0; cfg_samples = 4; start = 1;
    @(negedge clk); start = 0;
    expect_(cfg_error && !busy, "dims=0 accepted");
    if (cfg_error) n_cfg_error++;
    job(160, 6, 0, 0, 1);
    job(16, 40, 0, 1, 0);
    job(17, 8, 0, 0, 0);
    expect_(n_par_jobs > 0, "parallel engine never used");
    expect_(n_semi_jobs > 0, "semi-parallel engine never used");
    expect_(n_threshold > 0, "threshold dimensionality never run");
    expect_(n_multiline > 0, "multi-line samples never sent");
    expect_(n_in_stall > 0, "input never stalled");
    expect_(n_out_bp > 0, "output never back-pressured");
    expect_(n_cfg_error > 0, "configuration error never raised");
    $display("mechanisms: par=%0d semi=%0d threshold=%0d multiline=%0d in_stall=%0d out_bp=%0d overflow=%0d cfg_error=%0d",
             n_par_jobs, n_semi_jobs, n_threshold, n_multiline, n_in_stall, n_out_bp, n_overflow, n_cfg_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
