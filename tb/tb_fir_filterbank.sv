// tb_fir_filterbank: end-to-end test of the filter bank at reduced size
// (3 channels, short filters and buffers). Each channel gets its own random
// coefficients. Every stage result on out_data is compared with a model that
// keeps, per channel and block, the sequence of values written into the
// block: a write overwrites the newest value, and an advance of the block's
// write address (every 2^dec_log2 samples, after the block's own filter has
// run) opens a new slot. Filter outputs come from fir_ref_pkg.
// Phases: four stages without decimation, a mode switch to three stages with
// 4x decimation, four stages with 8x decimation, and one saturating stage.
// It counts how often each mechanism happened - cascade write-back, circular
// buffer wrap, decimation (results that are not final), overrun, mode
// switch, saturation - and fails on one that never happened. It also checks
// the cycle count per sample, the reserved output space and coefficient
// readback through the host read port.
module tb_fir_filterbank;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  localparam int CH = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, overrun, out_valid, out_final;
  logic [CH-1:0][DATA_W-1:0] in_data, out_data;
  logic [STAGE_W-1:0] out_stage;
  logic cw_en, am_we, mode_we, hr_coef;
  logic [CH-1:0] cw_mask;
  logic [ENTRY_W-1:0] cw_entry, am_data;
  logic [DATA_W-1:0] cw_data;
  logic [STAGE_W-1:0] am_stage;
  am_field_e am_field;
  mode_t mode_wdata;
  logic [1:0] hr_ch;
  logic [ADDR_W-1:0] hr_addr;
  logic [WORD_W-1:0] hr_data;

  fir_filterbank #(.CHANNELS(CH)) dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cascade = 0, n_wrap = 0, n_nonfinal = 0, n_final = 0, n_overrun = 0, n_mode = 0, n_sat = 0;

  // model state
  int coef [CH][4][$];
  int hist [CH][4][$];       // values in each block, newest last
  int taps_m[4], len_m[4], out_m[4];
  int swa_m[4];              // only to count wraps
  int last_m;                // last stage
  int dec_m[4];
  int smp = 0;
  int last_out [CH][4];

  typedef struct {
    int          stage;
    bit          fin;
    int          data [CH];
  } exp_t;
  exp_t expq[$];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int rnd(input int bits);
    int v = int'($urandom);
    return (bits >= 32) ? v : (v >>> (32 - bits));
  endfunction

  task automatic am_wr(input int st, input am_field_e f, input int d);
    @(negedge clk);
    am_we = 1; am_stage = STAGE_W'(st); am_field = f; am_data = ENTRY_W'(d);
    @(negedge clk);
    am_we = 0;
  endtask

  task automatic set_mode(input int last, input int d0, input int d1, input int d2, input int d3);
    @(negedge clk);
    mode_we = 1; mode_wdata.last_stage = STAGE_W'(last);
    mode_wdata.dec_log2 = {2'(d3), 2'(d2), 2'(d1), 2'(d0)};
    @(negedge clk);
    mode_we = 0;
    if (smp > 0 && last != last_m) n_mode++;
    last_m = last; dec_m = '{d0, d1, d2, d3};
  endtask

  // Load new coefficients for stage st (all channels, different values).
  task automatic load_coefs(input int st, input int bits, input bit big);
    for (int ch = 0; ch < CH; ch++) begin
      coef[ch][st] = {};
      for (int k = 0; k < taps_m[st]; k++) begin
        int c = big ? 32'h7FFF_0000 - k : rnd(bits);
        coef[ch][st].push_back(c);
        @(negedge clk);
        cw_en = 1; cw_mask = CH'(1) << ch; cw_entry = ENTRY_W'(st * 128 + k); cw_data = c;
        @(negedge clk);
        cw_en = 0;
      end
    end
  endtask

  task automatic config_stage(input int st, input int t, input int len);
    taps_m[st] = t; len_m[st] = len; swa_m[st] = 0;
    am_wr(st, AM_LEN, len);
    am_wr(st, AM_TAPS, t);
    am_wr(st, AM_SWA, 0);
    for (int ch = 0; ch < CH; ch++) begin
      hist[ch][st] = {};
      repeat (len) hist[ch][st].push_back(0);
    end
  endtask

  // Model of one input sample; pushes the expected results.
  task automatic model_sample(input int x [CH]);
    exp_t e;
    for (int ch = 0; ch < CH; ch++) hist[ch][0][$] = x[ch];
    for (int s = 0; s <= last_m; s++) begin
      bit dend;
      dend = (smp % (1 << dec_m[s])) == (1 << dec_m[s]) - 1;
      e.stage = s;
      e.fin   = (s == last_m) && dend;
      for (int ch = 0; ch < CH; ch++) begin
        int sv[$];
        bit sat;
        int n = hist[ch][s].size();
        sv = {};
        for (int k = 0; k < taps_m[s]; k++) sv.push_back(hist[ch][s][n - 1 - k]);
        e.data[ch] = fir_ref(coef[ch][s], sv, sat);
        if (sat) n_sat++;
        else check(real'(e.data[ch]) - fir_ideal(coef[ch][s], sv) < 2.0 * (taps_m[s] + 2) &&
                   fir_ideal(coef[ch][s], sv) - real'(e.data[ch]) < 2.0 * (taps_m[s] + 2),
                   "three-product result close to the exact product");
        if (dend) hist[ch][s].push_back(0);   // address advanced: new slot for the next write
        if (s < last_m) hist[ch][s + 1][$] = e.data[ch];
      end
      if (dend) begin
        swa_m[s]++;
        if (swa_m[s] == len_m[s]) begin swa_m[s] = 0; n_wrap++; end
      end
      if (s < last_m) n_cascade++;
      if (s == last_m) begin if (e.fin) n_final++; else n_nonfinal++; end
      expq.push_back(e);
    end
    smp++;
  endtask

  // Monitor.
  always @(negedge clk) if (rst_n && out_valid) begin
    if (expq.size() == 0) check(0, "unexpected output");
    else begin
      exp_t e;
      e = expq.pop_front();
      check(int'(out_stage) == e.stage, $sformatf("out_stage %0d exp %0d", out_stage, e.stage));
      check(out_final == e.fin, $sformatf("out_final %0d exp %0d (stage %0d)", out_final, e.fin, e.stage));
      for (int ch = 0; ch < CH; ch++) begin
        check(out_data[ch] == e.data[ch], $sformatf("sample %0d ch %0d stage %0d: got %h exp %h",
                                                    smp, ch, e.stage, out_data[ch], e.data[ch]));
        last_out[ch][e.stage] = e.data[ch];
      end
    end
  end

  function automatic int period();
    int f = 2 + last_m;
    for (int s = 0; s <= last_m; s++) f += 3 * taps_m[s] + 3;
    return f;
  endfunction

  task automatic push(input int bits, input bit try_overrun);
    int x [CH];
    int cyc;
    for (int ch = 0; ch < CH; ch++) x[ch] = rnd(bits);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1;
    for (int ch = 0; ch < CH; ch++) in_data[ch] = x[ch];
    model_sample(x);
    @(negedge clk);
    in_valid = 0;
    in_data = '0;
    cyc = 1;
    while (!in_ready) begin
      if (try_overrun && cyc == 10) begin
        in_valid = 1; in_data = '1;
        #1 check(overrun, "overrun flagged");
        if (overrun) n_overrun++;
      end
      @(negedge clk);
      in_valid = 0;
      cyc++;
    end
    check(cyc == period(), $sformatf("cycles per sample %0d, expected %0d", cyc, period()));
  endtask

  task automatic host_read(input int ch, input bit cf, input int addr, output logic [WORD_W-1:0] d);
    @(negedge clk);
    hr_ch = 2'(ch); hr_coef = cf; hr_addr = ADDR_W'(addr);
    @(negedge clk);
    d = hr_data;
  endtask

  task automatic check_output_space();
    logic [WORD_W-1:0] lo, hi;
    for (int ch = 0; ch < CH; ch++)
      for (int s = 0; s <= last_m; s++) begin
        host_read(ch, 0, out_m[s] * 2, lo);
        host_read(ch, 0, out_m[s] * 2 + 1, hi);
        check(lo == lsw_of(last_out[ch][s]) && hi == msw_of(last_out[ch][s]),
              $sformatf("reserved output space ch %0d stage %0d", ch, s));
      end
    for (int ch = 0; ch < CH; ch++) begin
      host_read(ch, 1, 2 * 128 + 1, hi);
      check(hi == msw_of(coef[ch][1][0]), "coefficient readback");
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0; cw_en = 0; cw_mask = '0; cw_entry = '0; cw_data = '0;
    am_we = 0; am_stage = '0; am_field = AM_SWA; am_data = '0; mode_we = 0; mode_wdata = '0;
    hr_ch = '0; hr_coef = 0; hr_addr = '0; last_m = 3; dec_m = '{0, 0, 0, 0};
    for (int s = 0; s < 4; s++) out_m[s] = 120 + s;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Phase A: four stages, no decimation
    config_stage(0, 5, 8);
    config_stage(1, 4, 6);
    config_stage(2, 3, 5);
    config_stage(3, 6, 7);
    for (int s = 0; s < 4; s++) load_coefs(s, 30, 0);
    set_mode(3, 0, 0, 0, 0);
    for (int n = 0; n < 20; n++) push(32, n == 3);
    check_output_space();

    // Phase B: mode switch to three stages, decimation 2 then 4
    set_mode(2, 0, 1, 2, 0);
    for (int n = 0; n < 24; n++) push(32, n == 5);

    // Phase C: four stages, 8x decimation; stage 3 gets new coefficients
    load_coefs(3, 31, 0);
    set_mode(3, 0, 1, 2, 3);
    for (int n = 0; n < 40; n++) push(32, 0);
    check_output_space();

    // Phase D: one stage with large coefficients and inputs: saturation
    set_mode(0, 0, 0, 0, 0);
    taps_m[0] = 2;
    am_wr(0, AM_TAPS, 2);
    load_coefs(0, 32, 1);
    for (int n = 0; n < 8; n++) push(32, 0);
    for (int n = 0; n < 4; n++) push(10, 0);

    repeat (10) @(negedge clk);
    check(expq.size() == 0, "all expected outputs seen");
    $display("mechanisms: cascade=%0d wrap=%0d nonfinal=%0d final=%0d overrun=%0d mode_switch=%0d saturation=%0d",
             n_cascade, n_wrap, n_nonfinal, n_final, n_overrun, n_mode, n_sat);
    check(n_cascade > 0, "cascade exercised");
    check(n_wrap > 0, "buffer wrap exercised");
    check(n_nonfinal > 0, "decimation exercised");
    check(n_final > 0, "final outputs seen");
    check(n_overrun > 0, "overrun exercised");
    check(n_mode > 0, "mode switch exercised");
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
