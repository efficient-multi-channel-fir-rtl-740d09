// tb_mac_unit: self-checking test of one MAC unit on its own. The testbench
// plays the control logic: it loads T random coefficients through the host
// port and T random samples through the write-back port, runs the three
// multiplication passes (LSW*MSW, MSW*LSW, MSW*MSW) with its own addresses,
// and compares the result with fir_ref_pkg three cycles after the last fetch
// (and not earlier). It then writes the result back into the sample memory
// and reads both words, and the coefficient words, through the host read port.
module tb_mac_unit;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mac_ctrl_t          ctrl;
  logic [ADDR_W-1:0]  s_raddr, c_raddr, hr_addr;
  logic [ENTRY_W-1:0] s_wentry, cw_entry;
  logic [DATA_W-1:0]  in_sample, cw_data, result;
  logic               cw_en;
  logic [WORD_W-1:0]  hr_sdata, hr_cdata;
  int checks = 0, failures = 0;

  mac_unit dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    ctrl = '0; cw_en = 0;
  endtask

  function automatic int rnd32(input int mag_bits);
    int v = int'($urandom);
    return (mag_bits >= 32) ? v : (v >>> (32 - mag_bits));
  endfunction

  task automatic run_filter(input int t, input int base);   // base: block offset in entries
    int c[$], s[$];
    int exp;
    bit sat;
    c = {}; s = {};
    // load
    for (int k = 0; k < t; k++) begin
      c.push_back(rnd32(($urandom % 3 == 0) ? 32 : 28));
      s.push_back(rnd32(32));
      @(negedge clk);
      cw_en = 1; cw_entry = ENTRY_W'(base + k); cw_data = c[k];
      ctrl.wr = 1; ctrl.wr_in = 1; s_wentry = ENTRY_W'(base + k); in_sample = s[k];
      @(negedge clk);
      idle();
    end
    exp = fir_ref(c, s, sat);
    // three passes
    for (int p = 0; p < 3; p++) begin
      for (int k = 0; k < t; k++) begin
        @(negedge clk);
        ctrl = '0;
        ctrl.rd    = 1;
        ctrl.first = (p == 0 && k == 0);
        ctrl.scale = (p == 2 && k == 0);
        s_raddr = {ENTRY_W'(base + k), (p != 1)};   // pass 0: S_MSW, 1: S_LSW, 2: S_MSW
        c_raddr = {ENTRY_W'(base + k), (p != 0)};   // pass 0: C_LSW, 1: C_MSW, 2: C_MSW
      end
    end
    @(negedge clk); idle();          // t+1
    @(negedge clk);                  // t+2: last product not yet accumulated
    if (!sat) check(result !== exp || hi16(c[t-1]) * hi16(s[t-1]) == 0,
                                  "result must not be final two cycles after the last fetch");
    @(negedge clk);                  // t+3
    check(result === exp, $sformatf("T=%0d result %h expected %h", t, result, exp));
    if (!sat) check(((real'(exp) - fir_ideal(c, s)) < 2.0 * (t + 2)) &&
                    ((fir_ideal(c, s) - real'(exp)) < 2.0 * (t + 2)), "error against exact product");
    // write the result back and read it through the host port
    ctrl.wr = 1; ctrl.wr_in = 0; s_wentry = ENTRY_W'(base + 127);
    @(negedge clk); idle();
    hr_addr = {ENTRY_W'(base + 127), 1'b0};
    @(negedge clk);
    check(hr_sdata === lsw_of(exp), "result LSW in sample memory");
    hr_addr = {ENTRY_W'(base + 127), 1'b1};
    @(negedge clk);
    check(hr_sdata === msw_of(exp), "result MSW in sample memory");
    hr_addr = {ENTRY_W'(base + t - 1), 1'b1};
    @(negedge clk);
    check(hr_cdata === msw_of(c[t-1]), "coefficient MSW readback");
    check(result === exp, "result holds while idle");
  endtask

  initial begin
    idle(); s_raddr = '0; c_raddr = '0; hr_addr = '0; s_wentry = '0; cw_entry = '0;
    in_sample = '0; cw_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_filter(1, 0);
    run_filter(100, 128);
    for (int n = 0; n < 40; n++) run_filter(1 + int'($urandom % 30), 128 * int'($urandom % 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
