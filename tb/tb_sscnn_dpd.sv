// tb_sscnn_dpd: end-to-end test of the SSCNN(9) predistorter at its default
// sizes (memory depth 2, 9 hidden neurons, L = 9, 2 outputs, 85
// coefficients).
//
// The stimulus is a synthetic multi-tone complex baseband signal, the same
// length as the evaluation record of the predistorter (25600 samples), with
// random gaps in in_valid. All 85 coefficients are loaded through the
// coefficient port, then the record is streamed; afterwards the coefficients
// are replaced and further segments run: a drive level that takes hidden
// neurons past both ends of the spline range, and large output weights that
// saturate the output words. Every output is compared with an integer model
// of the whole network built from the reference package, and must arrive
// exactly 19 clocks after its input. The test counts how often each
// mechanism happened (valid gaps, spline clamp low/high, in-range segments,
// layer saturation, coefficient reloads) and fails any that never did.
module tb_sscnn_dpd;
  import sscnn_pkg::*;
  import sscnn_ref_pkg::*;

  localparam int MD = 2, NH = 9, L = 9, NO = 2, SHIFT = 2;
  localparam int NX = 2 * (MD + 1), NOI = NH + 2;
  localparam int LATENCY = NX + 2 + NOI;
  localparam int N_RECORD = 25600;

  logic clk = 0, rst_n = 0, in_valid = 0, coef_we = 0, out_valid;
  fix_t in_i = '0, in_q = '0, coef_data = '0, out_i, out_q;
  logic [6:0] coef_addr = '0;

  sscnn_dpd dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_gap = 0, n_clamp_lo = 0, n_clamp_hi = 0, n_inside = 0, n_sat_hidden = 0,
      n_sat_out = 0, n_reload = 0, n_out = 0;

  int win  [NH][NX];
  int cc   [] = new[L];
  int wout [NO][NOI];
  int hist_i [MD], hist_q [MD];

  typedef struct { int t; int oi; int oq; } exp_t;
  exp_t q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected out_valid"); end
    else begin
      e = q.pop_front();
      if (cyc - e.t != LATENCY) begin failures++; $display("FAIL latency %0d", cyc - e.t); end
      checks += 2;
      if (out_i !== e.oi || out_q !== e.oq) begin
        failures++;
        if (failures < 10) $display("FAIL out got (%h,%h) exp (%h,%h)", out_i, out_q, e.oi, e.oq);
      end
      n_out++;
    end
  end

  function automatic int rnd_signed(input int bits);
    return int'($urandom_range(0, (1 << bits) - 1)) - (1 << (bits - 1));
  endfunction

  task automatic write_coef(input int addr, input int value);
    @(negedge clk);
    coef_we = 1; coef_addr = 7'(addr); coef_data = value;
  endtask

  // Fill all 85 coefficients; in_bits/out_bits set the weight ranges.
  task automatic load_all(input int in_bits, input int out_bits);
    int a = 0;
    for (int m = 0; m < NH; m++)
      for (int p = 0; p < NX; p++) begin win[m][p] = rnd_signed(in_bits); write_coef(a++, win[m][p]); end
    for (int k = 0; k < L; k++) begin cc[k] = rnd_signed(27); write_coef(a++, cc[k]); end
    for (int m = 0; m < NO; m++)
      for (int p = 0; p < NOI; p++) begin wout[m][p] = rnd_signed(out_bits); write_coef(a++, wout[m][p]); end
    @(negedge clk); coef_we = 0;
    n_reload++;
  endtask

  // Model of the network for one valid sample (updates the history).
  task automatic model(input int si, input int sq);
    int xv [] = new[NX];
    int wv [] = new[NX];
    int ov [] = new[NOI];
    int wo [] = new[NOI];
    int hq [NH];
    int res [NO];
    exp_t e;
    xv[0] = si; xv[MD+1] = sq;
    for (int k = 1; k <= MD; k++) begin xv[k] = hist_i[k-1]; xv[MD+1+k] = hist_q[k-1]; end
    for (int m = 0; m < NH; m++) begin
      longint idx;
      foreach (wv[p]) wv[p] = win[m][p];
      hq[m] = neuron_ref(xv, wv);
      if (hq[m] == int'(WMAX) || hq[m] == int'(WMIN)) n_sat_hidden++;
      idx = spline_index(hq[m], SHIFT);
      if (idx < 0) n_clamp_lo++; else if (idx > (longint'(L) - 2)) n_clamp_hi++; else n_inside++;
      ov[m] = spline_ref(hq[m], cc, L, SHIFT);
    end
    ov[NH] = abs_ref(si); ov[NH+1] = abs_ref(sq);
    for (int m = 0; m < NO; m++) begin
      foreach (wo[p]) wo[p] = wout[m][p];
      res[m] = neuron_ref(ov, wo);
      if (res[m] == int'(WMAX) || res[m] == int'(WMIN)) n_sat_out++;
    end
    e.t = cyc; e.oi = res[0]; e.oq = res[NO-1];
    q.push_back(e);
    for (int k = MD-1; k > 0; k--) begin hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; end
    hist_i[0] = si; hist_q[0] = sq;
  endtask

  // Multi-tone complex signal: NT tones with random frequencies and phases,
  // peak amplitude about `amp` (in units of 1.0).
  localparam int NT = 12;
  real fr [NT], ph [NT];

  task automatic stream(input int n, input real amp);
    int sent = 0;
    for (int t = 0; t < NT; t++) begin
      fr[t] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * 0.09;  // cycles per sample
      ph[t] = real'($urandom_range(0, 6283)) / 1000.0;
    end
    while (sent < n) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      if (!in_valid) n_gap++;
      else begin
        real si = 0.0, sq = 0.0;
        for (int t = 0; t < NT; t++) begin
          si += $cos(6.283185307 * fr[t] * sent + ph[t]);
          sq += $sin(6.283185307 * fr[t] * sent + ph[t]);
        end
        in_i = fix_t'(longint'(si * amp / 4.0 * 67108864.0));
        in_q = fix_t'(longint'(sq * amp / 4.0 * 67108864.0));
        model(in_i, in_q);
        sent++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LATENCY + 2) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < MD; k++) begin hist_i[k] = 0; hist_q[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // The evaluation record: weights in (-0.5, 0.5), signal peak ~1.
    load_all(26, 26);
    stream(N_RECORD, 1.0);
    // Stronger drive: hidden neurons reach well past [-1, 1).
    load_all(28, 26);
    stream(2000, 3.0);
    // Large weights in both linear layers: their output words saturate.
    load_all(31, 31);
    stream(1000, 2.0);
    checks += 9;
    if (q.size() != 0)      begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    if (n_out != N_RECORD + 3000) begin failures++; $display("FAIL %0d outputs", n_out); end
    if (n_gap == 0)         begin failures++; $display("FAIL no valid gaps"); end
    if (n_clamp_lo == 0)    begin failures++; $display("FAIL spline never clamped low"); end
    if (n_clamp_hi == 0)    begin failures++; $display("FAIL spline never clamped high"); end
    if (n_inside == 0)      begin failures++; $display("FAIL spline never in range"); end
    if (n_sat_hidden == 0)  begin failures++; $display("FAIL input layer never saturated"); end
    if (n_sat_out == 0)     begin failures++; $display("FAIL output layer never saturated"); end
    if (n_reload < 2)       begin failures++; $display("FAIL coefficients never reloaded"); end
    $display("mechanisms: gaps=%0d clamp_lo=%0d clamp_hi=%0d inside=%0d sat_hidden=%0d sat_out=%0d reloads=%0d outputs=%0d",
             n_gap, n_clamp_lo, n_clamp_hi, n_inside, n_sat_hidden, n_sat_out, n_reload, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
