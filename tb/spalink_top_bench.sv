// spalink_top_bench: end-to-end checker for spalink_top, shared by the
// top-level testbenches (each sets the configuration through parameters;
// with DEFAULTS = 1 the top is instantiated with no parameter list at all).
// It raises `done` when the run is over (or its watchdog expires); the
// wrapping testbench then prints the result line and finishes.
//
// Clocks: clk_fm period 20, clk_ser period 2 with rising edges on clk_fm's,
// clk_link period 20, 6 units after clk_fm.
//
// What it checks:
//  1. A cycle-level reference model of the tone chain (four accumulators,
//     $sin tables, two adder levels, divide by 4, sigma-delta loop in
//     integrator form for order 1 and error-feedback form for order 2)
//     predicts dacout bit for bit, every CLKFM cycle.
//  2. Over NSAMP samples the spectrum of the +-1 bitstream holds the four
//     tones at the expected amplitude (within 10 %), bins between the
//     tones are at least 26 dB lower, and the quantisation noise near
//     CLKFM/2 is at least 10 dB above the noise at 3-9.5 MHz (noise shaping).
//  3. The link output, demodulated by the square carrier, is each
//     modulator bit repeated 10 times in order (transceiver: serial stream;
//     parallel: one 10-bit word per CLKFM cycle, differential pins
//     complementary).
//  4. Every mechanism happened: link words written, transceiver words
//     serialized, carrier inversions within a sample, capture on the
//     feedback clock (feedback mode), forwarded link clock following the
//     output clock (parallel link), quantiser clamps (second order).
module spalink_top_bench #(
  parameter bit          DEFAULTS = 1'b1,
  parameter bit          MGT      = 1'b1,
  parameter int unsigned FS       = 20,
  parameter bit          FB       = 1'b0,
  parameter bit          LVDS     = 1'b1,
  parameter int unsigned ORDER    = 1,
  parameter int unsigned N        = 10,
  parameter int unsigned NSAMP    = 15000
) ();
  localparam real  CLK_HZ = 150.0e6;
  localparam int   FSV    = 1 << (N - 1);
  localparam int   WARM   = 200;
  localparam int   TOTAL  = NSAMP + WARM + 100;
  localparam int   SPW    = MGT ? 2 : 1;          // samples per link word
  localparam int   BPS    = FS / SPW;             // link bits per sample

  logic clk_fm = 1'b0, clk_ser = 1'b1, clk_link = 1'b0;
  logic rst = 1'b1;
  logic mgt_txserial, dacout, sd_overload, frame_valid;
  logic [FS-1:0] par_p, par_n;
  logic par_clk_p, par_clk_n;

  if (DEFAULTS) begin : g_default
    spalink_top u_top (
      .clk_fm, .rst, .clk_ser, .rst_ser(rst), .clk_link, .rst_link(rst),
      .mgt_txserial, .par_data_p(par_p), .par_data_n(par_n), .par_clk_p, .par_clk_n,
      .dacout, .sd_overload, .frame_valid);
  end else begin : g_custom
    spalink_top #(
      .DAC_NUM_BITS(N), .FS_MULTIPLICATION_FACTOR(FS), .EXTERNAL_CLOCK_FEEDBACK(FB),
      .OUTPUT_LVDS(LVDS), .VIRTEXIIPRO_MGT(MGT), .SD_ORDER(ORDER)
    ) u_top (
      .clk_fm, .rst, .clk_ser, .rst_ser(rst), .clk_link, .rst_link(rst),
      .mgt_txserial, .par_data_p(par_p), .par_data_n(par_n), .par_clk_p, .par_clk_n,
      .dacout, .sd_overload, .frame_valid);
  end

  always #10 clk_fm = ~clk_fm;
  always #1  clk_ser = ~clk_ser;
  initial begin
    #6;
    forever #10 clk_link = ~clk_link;
  end

  int checks = 0, failures = 0;
  bit done = 1'b0;      // the wrapping testbench reports and finishes

  initial begin
    repeat (TOTAL + 2000) @(posedge clk_fm);
    failures++;
    $display("watchdog expired");
    done = 1'b1;
  end

  // ---------------- reference model of the tone chain ----------------
  localparam real TONE [4] = '{1.0e6, 1.2e6, 1.4e6, 1.6e6};
  longint unsigned tw [4], acc [4];
  int sine [4], n2, n3, n1;
  int s1, yv1, e1, e2;          // modulator state
  bit m_dout, m_ovl;

  function automatic int ref_sine(longint unsigned a);
    longint unsigned ph;
    real v;
    ph = (a >> (33 - 11)) & 64'h7ff;
    v  = real'(FSV - 1) * $sin(2.0 * 3.14159265358979323846 * real'(ph) / 2048.0);
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  function automatic int floor_div4(int s);
    return (s >= 0) ? s / 4 : -((-s + 3) / 4);
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin
      tw[i]  = longint'($rtoi(TONE[i] * (2.0 ** 33) / CLK_HZ + 0.5));
      acc[i] = 0; sine[i] = 0;
    end
    n1 = 0; n2 = 0; n3 = 0;
    s1 = 0; yv1 = 0; e1 = 0; e2 = 0; m_dout = 0; m_ovl = 0;
  end

  task automatic model_step();
    int x, w, yv;
    x = floor_div4(n1);
    if (ORDER == 1) begin
      s1 = s1 + x - yv1;
      m_dout = (s1 >= 0);
      yv1 = m_dout ? FSV : -FSV;
      m_ovl = 0;
    end else begin
      w = x - 2 * e1 + e2;
      m_ovl = 0;
      if (w > 4 * FSV - 1) begin w = 4 * FSV - 1; m_ovl = 1; end
      if (w < -4 * FSV)    begin w = -4 * FSV;    m_ovl = 1; end
      m_dout = (w >= 0);
      yv = m_dout ? FSV : -FSV;
      e2 = e1;
      e1 = yv - w;
    end
    n1 = n2 + n3;
    n2 = sine[0] + sine[1];
    n3 = sine[2] + sine[3];
    for (int i = 0; i < 4; i++) begin
      sine[i] = ref_sine(acc[i]);
      acc[i]  = (acc[i] + tw[i]) & ((64'd1 << 33) - 1);
    end
  endtask

  // ---------------- per-cycle comparison ----------------
  bit dac [TOTAL];
  int ncyc = 0;
  int frames = 0, clamps = 0;
  bit running = 0;

  always @(posedge clk_fm) begin
    if (running) model_step();
  end

  always @(negedge clk_fm) begin
    if (running && ncyc < TOTAL) begin
      checks += 2;
      if (dacout != m_dout) begin
        failures++;
        if (failures < 10) $display("cycle %0d: dacout %0b expected %0b", ncyc, dacout, m_dout);
      end
      if (sd_overload != m_ovl) failures++;
      dac[ncyc] = dacout;
      if (frame_valid) frames++;
      if (sd_overload) clamps++;
      ncyc++;
    end
  end

  // ---------------- link capture ----------------
  bit ser [TOTAL * 10 + 64];
  int nser = 0;
  always @(negedge clk_ser) begin
    if (running && nser < TOTAL * 10 + 64) begin
      ser[nser] = mgt_txserial;
      nser++;
    end
  end

  logic [FS-1:0] pw [TOTAL];
  int npw = 0, fb_captures = 0, lvds_bad = 0;
  logic [FS-1:0] at_fm;
  int fwd_edges = 0, fwd_bad = 0;
  // forwarded link clock: a copy of the output clock of the parallel link
  always @(posedge par_clk_p) if (running) fwd_edges++;
  always @(negedge (FB ? clk_link : clk_fm)) begin
    #1;
    if (running && !MGT && (par_clk_p != 1'b0 || (LVDS && par_clk_n != 1'b1))) fwd_bad++;
  end
  always @(posedge clk_fm) begin
    #1 at_fm = par_p;
  end
  always @(posedge clk_link) begin
    #1;
    if (running && !MGT && npw < TOTAL) begin
      pw[npw] = par_p;
      npw++;
      if (LVDS && par_n != ~par_p) lvds_bad++;
      if (par_p != at_fm) fb_captures++;
    end
  end

  // ---------------- analysis ----------------
  function automatic real dft_mag(real f_hz);
    real re, im, ph, k;
    re = 0; im = 0;
    k = f_hz * real'(NSAMP) / CLK_HZ;
    for (int n = 0; n < NSAMP; n++) begin
      ph = 2.0 * 3.14159265358979 * k * real'(n) / real'(NSAMP);
      re += (dac[WARM + n] ? 1.0 : -1.0) * $cos(ph);
      im -= (dac[WARM + n] ? 1.0 : -1.0) * $sin(ph);
    end
    return $sqrt(re * re + im * im);
  endfunction

  // noise shaping: noise power in 32 bins at 68-74.3 MHz (near CLKFM/2)
  // against 32 bins at 3.1-9.3 MHz; bins sit at odd multiples of
  // 0.1 MHz, clear of the tones and of their sums and differences (all
  // multiples of 0.2 MHz)
  int shaped = 0;
  task automatic check_shaping();
    real lo, hi, m, ratio_db;
    lo = 0; hi = 0;
    for (int i = 0; i < 32; i++) begin
      m = dft_mag(3.1e6 + i * 0.2e6);
      lo += m * m;
      m = dft_mag(68.1e6 + i * 0.2e6);
      hi += m * m;
    end
    ratio_db = 10.0 * $log10((hi + 1.0) / (lo + 1.0));
    $display("noise near CLKFM/2 is %0.1f dB above noise at 3-9.5 MHz", ratio_db);
    checks++;
    if (ratio_db < 10.0) failures++;
    else shaped = 1;
  endtask

  task automatic check_spectrum();
    real re, im, mag, expect_mag, ph, worst_noise, tone_min;
    int kt [4], kn [4];
    for (int i = 0; i < 4; i++) kt[i] = $rtoi(TONE[i] * NSAMP / CLK_HZ + 0.5);
    kn = '{kt[0] + 10, kt[1] + 10, kt[2] + 10, kt[3] + 10};
    expect_mag = real'(NSAMP) * (real'(FSV - 1) / 4.0 / real'(FSV)) / 2.0;
    tone_min = 1.0e9;
    for (int i = 0; i < 4; i++) begin
      re = 0; im = 0;
      for (int n = 0; n < NSAMP; n++) begin
        ph = 2.0 * 3.14159265358979 * real'(kt[i]) * real'(n) / real'(NSAMP);
        re += (dac[WARM + n] ? 1.0 : -1.0) * $cos(ph);
        im -= (dac[WARM + n] ? 1.0 : -1.0) * $sin(ph);
      end
      mag = $sqrt(re * re + im * im);
      $display("tone %0d (bin %0d): |X| = %0.1f, expected %0.1f", i, kt[i], mag, expect_mag);
      checks++;
      if (mag < 0.9 * expect_mag || mag > 1.1 * expect_mag) failures++;
      if (mag < tone_min) tone_min = mag;
    end
    worst_noise = 0;
    for (int i = 0; i < 4; i++) begin
      re = 0; im = 0;
      for (int n = 0; n < NSAMP; n++) begin
        ph = 2.0 * 3.14159265358979 * real'(kn[i]) * real'(n) / real'(NSAMP);
        re += (dac[WARM + n] ? 1.0 : -1.0) * $cos(ph);
        im -= (dac[WARM + n] ? 1.0 : -1.0) * $sin(ph);
      end
      mag = $sqrt(re * re + im * im);
      if (mag > worst_noise) worst_noise = mag;
    end
    $display("largest in-band gap bin |X| = %0.1f (%0.1f dB below weakest tone)",
             worst_noise, 20.0 * $log10(tone_min / (worst_noise + 1.0e-9)));
    checks++;
    if (worst_noise * 20.0 > tone_min) failures++;
  endtask

  // demodulated link sample k must equal dac[k + lag]
  int inversions = 0;
  task automatic check_link();
    int best_lag, best_off, best_pol, groups, bad, ok;
    bit found;
    bit d, y0;
    found = 0; best_lag = 0; best_off = 0; best_pol = 0;
    if (MGT) begin
      groups = nser / BPS - 4;
      // search bit offset, carrier polarity and latency on the first groups
      for (int off = 0; off < BPS && !found; off++)
        for (int pol = 0; pol < 2 && !found; pol++)
          for (int lag = -40; lag < 40 && !found; lag++) begin
            ok = 1;
            for (int k = 20; k < 220 && ok; k++) begin
              if (k + lag < 0 || k + lag >= ncyc) begin ok = 0; break; end
              for (int r = 0; r < BPS; r++) begin
                d = ser[off + k * BPS + r] ^ 1'(r % 2) ^ 1'(pol);
                if (d != dac[k + lag]) begin ok = 0; break; end
              end
            end
            if (ok) begin best_lag = lag; best_off = off; best_pol = pol; found = 1; end
          end
      checks++;
      if (!found) begin failures++; $display("serial stream does not decode"); return; end
      $display("serial stream: bit offset %0d, carrier polarity %0d, lag %0d samples",
               best_off, best_pol, best_lag);
      bad = 0;
      for (int k = 1; k < groups; k++) begin
        if (k + best_lag < 0 || k + best_lag >= ncyc) continue;
        for (int r = 0; r < BPS; r++) begin
          d = ser[best_off + k * BPS + r] ^ 1'(r % 2) ^ 1'(best_pol);
          checks++;
          if (d != dac[k + best_lag]) bad++;
          if (r > 0 && ser[best_off + k * BPS + r] != ser[best_off + k * BPS + r - 1]) inversions++;
        end
      end
      failures += bad;
      if (bad) $display("serial stream: %0d bad bits", bad);
    end else begin
      for (int lag = -20; lag < 20 && !found; lag++) begin
        ok = 1;
        for (int k = 20; k < 220 && ok; k++)
          if (k + lag < 0 || pw[k][0] != dac[k + lag]) ok = 0;
        if (ok) begin best_lag = lag; found = 1; end
      end
      checks++;
      if (!found) begin failures++; $display("parallel words do not decode"); return; end
      $display("parallel link: lag %0d samples", best_lag);
      bad = 0;
      for (int k = 1; k < npw; k++) begin
        if (k + best_lag < 0 || k + best_lag >= ncyc) continue;
        y0 = dac[k + best_lag];
        for (int r = 0; r < FS; r++) begin
          checks++;
          if (pw[k][r] != (y0 ^ 1'(r % 2))) bad++;
          if (r > 0 && pw[k][r] != pw[k][r-1]) inversions++;
        end
      end
      failures += bad;
      if (bad) $display("parallel link: %0d bad bits", bad);
      checks++;
      if (lvds_bad) begin failures++; $display("differential pins not complementary %0d times", lvds_bad); end
    end
  endtask

  task automatic mechanism(string name, int count);
    $display("mechanism %-28s : %0d", name, count);
    checks++;
    if (count == 0) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk_fm);
    #1 rst = 1'b0;
    running = 1'b1;
    wait (ncyc == TOTAL);
    running = 1'b0;
    #40;
    check_spectrum();
    check_shaping();
    check_link();
    mechanism("link words written", frames);
    if (MGT) mechanism("transceiver words serialized", nser / FS);
    mechanism("carrier inversions", inversions);
    mechanism("noise pushed away from the tones", shaped);
    if (!MGT && FB) mechanism("captures on feedback clock", fb_captures);
    if (!MGT) begin
      mechanism("forwarded link clock edges", fwd_edges);
      checks++;
      if (fwd_bad) begin failures++; $display("forwarded clock wrong %0d times", fwd_bad); end
      checks++;
      if (fwd_edges < npw - 2) begin failures++; $display("forwarded clock edges %0d, words %0d", fwd_edges, npw); end
    end
    if (ORDER == 2) mechanism("quantiser clamps", clamps);
    done = 1'b1;
  end
endmodule
