// tb_fir_control: self-checking test of the FIR control logic. The testbench
// stands in for the address processing unit (tap count per stage, dec_end)
// and compares, cycle by cycle, the commands the controller issues for one
// input sample with an expected schedule built independently: input write,
// then per stage three passes of T fetch cycles (load on the first tap of
// each pass, restart on the very first fetch, scale-down on the first fetch
// of the MSW*MSW pass), two drain cycles, the output write with pointer
// update, and the next-block write for all but the last stage. It also
// checks the cycle count per sample, overrun, out_final, and the mode register.
module tb_fir_control;
  import fir_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_accept, overrun, mode_we, dec_end;
  logic out_valid, out_final, busy;
  logic [STAGE_W-1:0] out_stage;
  mode_t mode_wdata, mode;
  logic [TAPS_W-1:0] taps;
  apu_cmd_t apu_cmd;
  mac_ctrl_t mac_ctrl;
  int checks = 0, failures = 0;
  int t_of[4];
  bit dec_flag;
  int overruns = 0;

  fir_control dut (.*);

  assign taps    = TAPS_W'(t_of[apu_cmd.stage]);
  assign dec_end = dec_flag;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef struct packed {
    apu_cmd_t  a;
    mac_ctrl_t m;
    logic      ov;     // out_valid
    logic      fin;    // out_final
  } step_t;

  function automatic step_t mk();
    step_t x = '0;
    return x;
  endfunction

  // One input sample with `nst` stages.
  task automatic one_sample(input int nst, input bit try_overrun);
    step_t exp[$];
    step_t x;
    int cyc;
    // expected schedule, starting with the cycle after acceptance
    x = mk(); x.a.wr = WR_INPUT; x.m.wr = 1; x.m.wr_in = 1; exp.push_back(x);
    for (int s = 0; s < nst; s++) begin
      for (int p = 0; p < 3; p++)
        for (int k = 0; k < t_of[s]; k++) begin
          x = mk(); x.a.stage = STAGE_W'(s); x.a.rd = 1; x.a.load = (k == 0); x.a.pass = pass_e'(p);
          x.m.rd = 1; x.m.first = (p == 0 && k == 0); x.m.scale = (p == 2 && k == 0);
          exp.push_back(x);
        end
      for (int d = 0; d < 2; d++) begin x = mk(); x.a.stage = STAGE_W'(s); exp.push_back(x); end
      x = mk(); x.a.stage = STAGE_W'(s); x.a.wr = WR_OUTPUT; x.a.ptr_upd = 1; x.a.done = (s == nst - 1);
      x.m.wr = 1; x.ov = 1; x.fin = (s == nst - 1) && dec_flag; exp.push_back(x);
      if (s < nst - 1) begin
        x = mk(); x.a.stage = STAGE_W'(s); x.a.wr = WR_NEXT; x.m.wr = 1; exp.push_back(x);
      end
    end
    // accept
    @(negedge clk);
    check(in_ready && !busy, "ready before the sample");
    in_valid = 1;
    #1 check(in_accept, "sample accepted");
    @(negedge clk);
    in_valid = 0;
    cyc = 0;
    foreach (exp[i]) begin
      step_t got;
      if (try_overrun && i == 5) begin
        in_valid = 1; #1;
        check(overrun && !in_accept, "overrun flagged, sample refused");
        if (overrun) overruns++;
      end
      got.a = apu_cmd; got.m = mac_ctrl; got.ov = out_valid; got.fin = out_final;
      // stage and pass only matter while fetching or writing back
      if (!exp[i].a.rd) got.a.pass = PASS_LM;
      if (!exp[i].a.rd && exp[i].a.wr == WR_NONE && !exp[i].ov) got.a.stage = exp[i].a.stage;
      check(got == exp[i], $sformatf("schedule cycle %0d: got %h exp %h", i, got, exp[i]));
      check(!in_ready, "busy during processing");
      if (got.ov) check(out_stage == exp[i].a.stage, "out_stage");
      @(negedge clk);
      in_valid = 0;
      cyc++;
    end
    check(in_ready, "ready after the last write-back");
    // acceptance cycle + schedule = 2 + sum(3T+3) + (stages-1)
    begin
      int f = 2 + (nst - 1);
      for (int s = 0; s < nst; s++) f += 3 * t_of[s] + 3;
      check(cyc + 1 == f, $sformatf("cycles per sample %0d, expected %0d", cyc + 1, f));
    end
  endtask

  initial begin
    in_valid = 0; mode_we = 0; mode_wdata = '0; dec_flag = 1;
    t_of = '{5, 3, 1, 7};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mode.last_stage == 2'd3 && mode.dec_log2 == '0, "mode register reset value");
    one_sample(4, 0);
    one_sample(4, 1);
    // mode switch: one and two stages
    for (int n = 1; n <= 4; n++) begin
      @(negedge clk);
      mode_we = 1; mode_wdata.last_stage = STAGE_W'(n - 1); mode_wdata.dec_log2 = {2'd3, 2'd2, 2'd1, 2'd0};
      @(negedge clk);
      mode_we = 0;
      check(mode == mode_wdata, "mode register write");
      for (int r = 0; r < 3; r++) begin
        dec_flag = 1'($urandom);
        for (int s = 0; s < 4; s++) t_of[s] = 1 + int'($urandom % 12);
        one_sample(n, r == 1);
      end
    end
    t_of = '{100, 100, 100, 100};
    one_sample(4, 1);
    check(overruns == 6, "overrun exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
