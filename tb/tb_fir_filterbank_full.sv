// tb_fir_filterbank_full: the filter bank at its default size - 8 channels,
// four cascaded 100-tap stages taken from the reset contents of the address
// memory, and 8x decimation (blocks 1..3 decimate by 2 each). Coefficients are
// windowed-sinc low-pass filters computed here (Hamming window, cut-off
// 0.4, 0.25, 0.25, 0.25 of the stage's sample rate, Q1.31), slightly different
// per channel; the inputs are a sine per channel plus noise. Every stage
// result is compared bit for bit with a model (see tb_fir_filterbank), and
// the cycle count per sample must equal 2 + 4*(3*100+3) + 3 = 1217, within the
// 1600 clock cycles available per sample at 160 MHz and 100 kHz. It then
// switches to a single 100-tap stage and checks its 305-cycle sample period
// against the 1000 cycles per sample of a 100 MHz clock.
module tb_fir_filterbank_full;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  localparam int CH = 8;
  localparam int T  = 100;
  localparam int NSAMPLES = 320;

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
  logic [2:0] hr_ch;
  logic [ADDR_W-1:0] hr_addr;
  logic [WORD_W-1:0] hr_data;

  fir_filterbank dut (.*);

  int checks = 0, failures = 0, n_final = 0, n_sat = 0;
  int coef [CH][4][$];
  int hist [CH][4][$];
  int dec_m[4];
  int last_m;
  int smp = 0;

  typedef struct {
    int stage;
    bit fin;
    int data [CH];
  } exp_t;
  exp_t expq[$];

  initial begin
    repeat (NSAMPLES * 1300 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int lowpass(input int k, input real fc, input int ch);
    real pi = 3.14159265358979;
    real m = real'(k) - real'(T - 1) / 2.0;
    real h = (m == 0.0) ? fc : $sin(pi * fc * m) / (pi * m);
    real w = 0.54 - 0.46 * $cos(2.0 * pi * k / (T - 1));
    return int'(h * w * (1.0 - 0.01 * ch) * 2147483648.0);
  endfunction

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
        for (int k = 0; k < T; k++) sv.push_back(hist[ch][s][n - 1 - k]);
        e.data[ch] = fir_ref(coef[ch][s], sv, sat);
        if (sat) n_sat++;
        if (dend) hist[ch][s].push_back(0);
        if (s < last_m) hist[ch][s + 1][$] = e.data[ch];
      end
      if (e.fin) n_final++;
      expq.push_back(e);
    end
    smp++;
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    if (expq.size() == 0) check(0, "unexpected output");
    else begin
      exp_t e;
      e = expq.pop_front();
      check(int'(out_stage) == e.stage && out_final == e.fin, "stage / final flag");
      for (int ch = 0; ch < CH; ch++)
        check(out_data[ch] == e.data[ch], $sformatf("sample %0d ch %0d stage %0d: got %h exp %h",
                                                    smp, ch, e.stage, out_data[ch], e.data[ch]));
    end
  end

  initial begin
    real fcs[4];
    fcs = '{0.4, 0.25, 0.25, 0.25};
    dec_m = '{0, 1, 2, 3};
    last_m = 3;
    in_valid = 0; in_data = '0; cw_en = 0; cw_mask = '0; cw_entry = '0; cw_data = '0;
    am_we = 0; am_stage = '0; am_field = AM_SWA; am_data = '0; mode_we = 0; mode_wdata = '0;
    hr_ch = '0; hr_coef = 0; hr_addr = '0;
    for (int ch = 0; ch < CH; ch++)
      for (int s = 0; s < 4; s++) begin
        hist[ch][s] = {};
        repeat ((s == 0) ? 120 : 128) hist[ch][s].push_back(0);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // coefficients
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < T; k++)
        for (int ch = 0; ch < CH; ch++) begin
          int c;
          c = lowpass(k, fcs[s], ch);
          coef[ch][s].push_back(c);
          @(negedge clk);
          cw_en = 1; cw_mask = CH'(1) << ch; cw_entry = ENTRY_W'(s * 128 + k); cw_data = c;
          @(negedge clk);
          cw_en = 0;
        end
    // 4 stages, 8x decimation
    @(negedge clk);
    mode_we = 1; mode_wdata.last_stage = 2'd3; mode_wdata.dec_log2 = {2'd3, 2'd2, 2'd1, 2'd0};
    @(negedge clk);
    mode_we = 0;
    for (int n = 0; n < NSAMPLES; n++) begin
      int x [CH];
      int cyc;
      for (int ch = 0; ch < CH; ch++)
        x[ch] = int'(1.0e9 * $sin(2.0 * 3.14159265358979 * (0.002 + 0.003 * ch) * n)) + (int'($urandom) >>> 6);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1;
      for (int ch = 0; ch < CH; ch++) in_data[ch] = x[ch];
      model_sample(x);
      @(negedge clk);
      in_valid = 0;
      cyc = 1;
      while (!in_ready) begin @(negedge clk); cyc++; end
      check(cyc == 1217, $sformatf("cycles per sample %0d, expected 1217", cyc));
      check(cyc <= 1600, "fits 160 MHz / 100 kHz");
    end
    repeat (10) @(negedge clk);
    check(expq.size() == 0, "all outputs seen");
    check(n_final == NSAMPLES / 8, $sformatf("decimated outputs %0d", n_final));
    // A single 100-tap filter per channel: 305 cycles, within the 1000 cycles
    // per sample of the 100 MHz / 100 kHz design goal.
    @(negedge clk);
    mode_we = 1; mode_wdata.last_stage = 2'd0; mode_wdata.dec_log2 = '0;
    @(negedge clk);
    mode_we = 0;
    last_m = 0; dec_m = '{0, 0, 0, 0};
    for (int n = 0; n < 40; n++) begin
      int x [CH];
      int cyc;
      for (int ch = 0; ch < CH; ch++) x[ch] = int'($urandom);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1;
      for (int ch = 0; ch < CH; ch++) in_data[ch] = x[ch];
      model_sample(x);
      @(negedge clk);
      in_valid = 0;
      cyc = 1;
      while (!in_ready) begin @(negedge clk); cyc++; end
      check(cyc == 305 && cyc <= 1000, $sformatf("single stage: cycles per sample %0d, expected 305", cyc));
    end
    repeat (10) @(negedge clk);
    check(expq.size() == 0, "all single-stage outputs seen");
    $display("final (8x decimated) outputs: %0d, saturated results: %0d", n_final, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
