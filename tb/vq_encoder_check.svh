// vq_encoder_check.svh: end-to-end stimulus and checker for vq_encoder_top,
// shared by the testbenches that run the encoder at different sizes.
//
// The including module declares localparams K, N, W, METRIC and instantiates the
// encoder as `dut` with .* connections to the signals declared here.
//
// Stimulus: a random codebook of N codewords (codeword N-1 is a copy of
// codeword 1 when N > 2, so that equal distortions occur) recirculates in
// the codeword stream; the input stream is delayed by N-1 slots. Slots
// below HALF_END use the 50%-efficiency format (a zero vector between any
// two vectors of either stream); from HALF_END on those slots of both
// streams are filled as well (100% efficiency). Most input vectors are a codeword plus small noise, the
// rest uniform random.
//
// Reference: an input vector in slot s meets, in row r, the codeword-stream
// slot q = s + 2r - (N-1). Its distortion to each met codeword is computed
// here from the stream contents; the minimum is taken with the comparing
// cells' tie rule (a later row wins a tie), and the expected index is the
// codebook index the testbench placed in the winning slot. The result must
// appear in phi2 period s + N + K + 2, which checks the latency of K + N + 1
// periods from array entry to output. Only slots whose N met codeword slots
// all hold codewords are checked.

localparam int unsigned DW = vq_pkg::dist_width(W, K);
localparam int unsigned IW = vq_pkg::id_width(N);
localparam int HALF_END = 12 * N;                 // first slot of 100% mode
localparam int NSLOT    = HALF_END + 12 * N + 2 * N;
localparam int NPER     = NSLOT + N + K + 4;      // periods simulated
localparam int FIRST    = 2 * N + K + 1;          // first result period
localparam int MAXCYC   = (NPER + 20) * K;

logic                 clk = 1'b0;
logic                 rst_n = 1'b0;
logic signed [W-1:0]  x_sample, c_sample;
logic        [IW-1:0] index;
logic        [DW-1:0] min_dist;
logic                 result_valid;

int checks = 0, failures = 0;

int cb     [N][K];
int xs     [NSLOT][K];
int cs     [NSLOT][K];
int cw_of  [NSLOT];     // codebook index in a codeword slot, -1 if zero
int exp_ok [NPER];      // 1 if a result is expected in this period
int exp_ix [NPER];
longint exp_d [NPER];
int exp_full[NPER];     // 1 if the result comes from an extra 100%-mode input slot
int exp_wrap[NPER];     // 1 if row + offset wrapped past N-1
int exp_tie [NPER];     // 1 if two rows had the minimum distortion
int exp_row [NPER];     // winning row
int cyc = 0;

int n_half = 0, n_full = 0, n_wrap = 0, n_tie = 0, n_valid = 0, n_seen = 0;
int n_row_win [N];

always #5 clk = ~clk;

function automatic int clampw(int v);
  int lo = -(1 << (W - 1));
  int hi = (1 << (W - 1)) - 1;
  return (v < lo) ? lo : (v > hi) ? hi : v;
endfunction

function automatic int rnd_sample(int span);
  return int'($urandom_range(2 * span, 0)) - span;
endfunction

// Build streams and the expected results.
initial begin
  int span;
  span = (1 << (W - 1)) - 8;
  for (int i = 0; i < N; i++)
    for (int n = 0; n < K; n++) cb[i][n] = rnd_sample(span);
  if (N > 2) for (int n = 0; n < K; n++) cb[N-1][n] = cb[1][n];

  for (int s = 0; s < NSLOT; s++) begin
    // codeword stream
    cw_of[s] = -1;
    if (s % 2 == 0) cw_of[s] = (s / 2) % N;
    else if (s >= HALF_END) cw_of[s] = ((s / 2) + (K % 2)) % N;
    for (int n = 0; n < K; n++) cs[s][n] = (cw_of[s] >= 0) ? cb[cw_of[s]][n] : 0;
    // input stream
    for (int n = 0; n < K; n++) xs[s][n] = 0;
    if (s >= N - 1 && (((s - (N - 1)) % 2 == 0) || s >= HALF_END)) begin
      if ($urandom_range(3, 0) != 0) begin
        int pick;
        pick = $urandom_range(N - 1, 0);
        for (int n = 0; n < K; n++) xs[s][n] = clampw(cb[pick][n] + rnd_sample(3));
      end else begin
        for (int n = 0; n < K; n++) xs[s][n] = rnd_sample((1 << (W - 1)) - 1);
      end
    end
  end

  for (int p = 0; p < NPER; p++) exp_ok[p] = 0;
  for (int s = 0; s < NSLOT; s++) begin
    bit     ok;
    longint best, d;
    int     bq, brow, nbest;
    ok = (s >= N - 1);
    best = -1; bq = 0; brow = 0; nbest = 0;
    for (int r = 0; r < N && ok; r++) begin
      int q;
      q = s + 2 * r - (N - 1);
      if (q < 0 || q >= NSLOT || cw_of[q] < 0) ok = 0;
      else begin
        d = 0;
        for (int n = 0; n < K; n++) begin
          longint e;
          e = longint'(xs[s][n] - cs[q][n]);
          d += (METRIC == vq_pkg::DIST_ABSOLUTE) ? ((e < 0) ? -e : e) : e * e;
        end
        if (best < 0 || d <= best) begin
          nbest = (d == best) ? nbest + 1 : 1;
          best = d; bq = q; brow = r;
        end
      end
    end
    if (ok) begin
      int p;
      p = s + N + K + 2;
      exp_ok[p]   = 1;
      exp_ix[p]   = cw_of[bq];
      exp_d[p]    = best;
      exp_full[p] = ((s - (N - 1)) % 2 != 0);
      exp_wrap[p] = (brow + cw_of[s - (N - 1)] >= N);
      exp_tie[p]  = (nbest > 1);
      exp_row[p]  = brow;
    end
  end
end

// Serial sample streams: slot cyc / K, component cyc % K.
always_comb begin
  int s, n;
  s = cyc / K;
  n = cyc % K;
  x_sample = (s < NSLOT) ? W'(xs[s][n]) : '0;
  c_sample = (s < NSLOT) ? W'(cs[s][n]) : '0;
end

always @(posedge clk) begin
  if (rst_n) begin
    int p;
    p = cyc / K;
    if (result_valid) begin
      n_valid++;
      checks++;
      if (cyc % K != 0 || p < FIRST) begin
        failures++;
        $display("FAIL result_valid at cycle %0d (period %0d)", cyc, p);
      end
      if (p < NPER && exp_ok[p] != 0) begin
        n_seen++;
        checks++;
        if (int'(index) != exp_ix[p] || longint'(min_dist) != exp_d[p]) begin
          failures++;
          $display("FAIL period %0d: index %0d dist %0d, expected %0d dist %0d",
                   p, index, min_dist, exp_ix[p], exp_d[p]);
        end
        if (exp_full[p] != 0) n_full++; else n_half++;
        if (exp_wrap[p] != 0) n_wrap++;
        if (exp_tie[p] != 0) n_tie++;
        n_row_win[exp_row[p]]++;
      end
    end
    cyc <= cyc + 1;
  end
end

initial begin
  int nexp;
  for (int r = 0; r < N; r++) n_row_win[r] = 0;
  repeat (3) @(negedge clk);
  rst_n = 1'b1;
  repeat (NPER * K) @(posedge clk);
  @(negedge clk);
  nexp = 0;
  for (int p = 0; p < NPER; p++) nexp += exp_ok[p];
  checks++;
  if (n_seen != nexp) begin
    failures++;
    $display("FAIL %0d results expected, %0d seen", nexp, n_seen);
  end
  checks++;
  if (n_valid != NPER - FIRST) begin
    failures++;
    $display("FAIL result_valid pulsed %0d times, expected %0d", n_valid, NPER - FIRST);
  end
  // every mechanism must have happened at least once
  checks++;
  if (n_half == 0 || n_full == 0 || n_wrap == 0 || (N > 2 && n_tie == 0)) begin
    failures++;
    $display("FAIL mechanism not exercised: half %0d full %0d wrap %0d tie %0d",
             n_half, n_full, n_wrap, n_tie);
  end
  for (int r = 0; r < N; r++) begin
    checks++;
    if (n_row_win[r] == 0) begin
      failures++;
      $display("FAIL comparing cell %0d never won", r);
    end
  end
  $display("%s K=%0d N=%0d W=%0d: 50%%-mode results %0d, 100%%-mode results %0d, offset wraps %0d, ties %0d",
           METRIC.name(), K, N, W, n_half, n_full, n_wrap, n_tie);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
