// tb_apu: self-checking test of the address processing unit. It checks the
// reset contents of the address memory, host writes, the filtering address
// sequence (sample entries counting down from the sample write address and
// wrapping inside the circular buffer, coefficient entries counting up, word
// select bit per pass) and the decimated advance of the write addresses,
// against a model kept in the testbench.
module tb_apu;
  import fir_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  apu_cmd_t           cmd;
  mode_t              mode;
  logic               am_we;
  logic [STAGE_W-1:0] am_stage;
  am_field_e          am_field;
  logic [ENTRY_W-1:0] am_data;
  logic [ADDR_W-1:0]  s_raddr, c_raddr;
  logic [ENTRY_W-1:0] s_wentry;
  logic [TAPS_W-1:0]  taps;
  logic               dec_end;
  int checks = 0, failures = 0;
  int m_swa[4], m_len[4], m_taps[4], m_out[4];
  int smp = 0;

  apu dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic am_wr(input int st, input am_field_e f, input int d);
    @(negedge clk);
    am_we = 1; am_stage = STAGE_W'(st); am_field = f; am_data = ENTRY_W'(d);
    @(negedge clk);
    am_we = 0;
    case (f)
      AM_SWA:  m_swa[st]  = d;
      AM_LEN:  m_len[st]  = d;
      AM_TAPS: m_taps[st] = d;
      default: m_out[st]  = d;
    endcase
  endtask

  task automatic check_wr(input int st);
    @(negedge clk);
    cmd = '0; cmd.stage = STAGE_W'(st);
    cmd.wr = WR_INPUT;  #1 check(s_wentry == ENTRY_W'(m_swa[0]), "input write entry");
    cmd.wr = WR_OUTPUT; #1 check(s_wentry == ENTRY_W'(m_out[st]), "output write entry");
    check(taps == TAPS_W'(m_taps[st]), "taps of stage");
    if (st < 3) begin
      cmd.wr = WR_NEXT; #1 check(s_wentry == ENTRY_W'((st + 1) * 128 + m_swa[st + 1]), "next-block write entry");
    end
    cmd = '0;
  endtask

  task automatic filter(input int st);
    for (int p = 0; p < 3; p++)
      for (int k = 0; k < m_taps[st]; k++) begin
        int se, ce;
        @(negedge clk);
        cmd = '0; cmd.stage = STAGE_W'(st); cmd.rd = 1; cmd.load = (k == 0);
        cmd.pass = pass_e'(p);
        se = st * 128 + ((m_swa[st] - k + 128 * m_len[st]) % m_len[st]);
        ce = st * 128 + k;
        #1;
        check(s_raddr == ADDR_W'(se * 2 + (p != 1)), $sformatf("sample address st%0d p%0d k%0d: %0d exp %0d", st, p, k, s_raddr, se * 2 + (p != 1)));
        check(c_raddr == ADDR_W'(ce * 2 + (p != 0)), "coefficient address");
      end
    @(negedge clk); cmd = '0;
  endtask

  // write-back of stage st: pointer update (decimated), done after the last stage
  task automatic writeback(input int st, input bit last);
    bit exp_end;
    exp_end = ((smp % (1 << mode.dec_log2[st])) == (1 << mode.dec_log2[st]) - 1);
    @(negedge clk);
    cmd = '0; cmd.stage = STAGE_W'(st); cmd.wr = WR_OUTPUT; cmd.ptr_upd = 1; cmd.done = last;
    #1 check(dec_end == exp_end, "dec_end");
    @(negedge clk); cmd = '0;
    if (exp_end) m_swa[st] = (m_swa[st] + 1) % m_len[st];
    if (last) smp++;
  endtask

  initial begin
    cmd = '0; mode = '0; am_we = 0; am_stage = '0; am_field = AM_SWA; am_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      m_swa[b] = 0; m_len[b] = (b == 0) ? 120 : 128; m_taps[b] = 100; m_out[b] = 120 + b;
    end
    for (int b = 0; b < 4; b++) check_wr(b);
    filter(0);
    // host writes
    for (int b = 0; b < 4; b++) begin
      am_wr(b, AM_LEN, 3 + int'($urandom % 20));
      am_wr(b, AM_TAPS, 1 + int'($urandom % m_len[b]));
      am_wr(b, AM_SWA, int'($urandom % m_len[b]));
      am_wr(b, AM_OUT, 100 + b * 3);
      check_wr(b);
    end
    // run "samples": every stage filters and writes back, with decimation
    mode.dec_log2 = {2'd3, 2'd2, 2'd1, 2'd0};
    for (int n = 0; n < 40; n++)
      for (int b = 0; b < 4; b++) begin
        filter(b);
        writeback(b, b == 3);
        check_wr(b);
      end
    // random decimation settings
    for (int n = 0; n < 40; n++) begin
      if (n % 10 == 0) for (int b = 0; b < 4; b++) mode.dec_log2[b] = 2'($urandom);
      for (int b = 0; b < 4; b++) begin
        filter(b);
        writeback(b, b == 3);
        check_wr(b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
