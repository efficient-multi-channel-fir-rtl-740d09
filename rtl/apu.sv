// apu: Address Processing Unit. Generates the sample- and coefficient-memory
// addresses shared by all MAC units.
//
// It holds the address memory - per block b: the sample write address SWA[b]
// (entry offset of the newest sample of block b's circular buffer), the buffer
// length LEN[b], the stage's tap count TAPS[b] and the absolute entry OUT[b]
// of the stage's reserved output word pair (in block 0, above LEN[0]) - plus
// two filtering counters, one for sample and one for coefficient entries.
//
// Filtering stage s, tap k reads sample entry {s, (SWA[s]-k) mod LEN[s]} and
// coefficient entry {s, k}: coefficient 0 meets the newest sample. On cmd.load
// the counters start from SWA[s] and 0 (the address is produced in the same
// cycle); every further cmd.rd steps the sample counter down, wrapping inside
// the buffer, and the coefficient counter up. The word select bit comes from
// the pass: LSW*MSW, MSW*LSW, MSW*MSW (coefficient bit, sample bit).
// Write-back entries: input -> {0, SWA[0]}, output -> OUT[s],
// next block -> {s+1, SWA[s+1]}. On cmd.ptr_upd SWA[s] advances by one, but
// only on the last input sample of block s's decimation period (2^dec_log2[s]
// input samples, counted by a free-running sample counter advanced by
// cmd.done); so a decimating block has the same entry overwritten until the
// last, real value lands. dec_end tells the control logic that stage
// cmd.stage's result of this sample is a real (decimated) one.
//
// Address calculation is combinational from cmd; the registers update at the
// clock edge. Host writes to the address memory (am_we) take precedence.
// Reset values: LEN = 120,128,128,128, TAPS = 100, SWA = 0, OUT[b] = 120+b.
// The two counters, the address memory with sample write addresses, write-back
// to the next block and decimation by slower advances are the architecture's;
// the LEN and TAPS fields, the circular buffers and the power-of-two
// decimation periods are choices of this design.
module apu
  import fir_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  apu_cmd_t           cmd,
  input  mode_t              mode,
  input  logic               am_we,
  input  logic [STAGE_W-1:0] am_stage,
  input  am_field_e          am_field,
  input  logic [ENTRY_W-1:0] am_data,
  output logic [ADDR_W-1:0]  s_raddr,
  output logic [ADDR_W-1:0]  c_raddr,
  output logic [ENTRY_W-1:0] s_wentry,
  output logic [TAPS_W-1:0]  taps,      // TAPS of stage cmd.stage
  output logic               dec_end
);

  localparam int unsigned CNT_W = 1 << DEC_W;   // sample counter covers the longest period

  logic [OFF_W-1:0]   swa  [NBLOCKS];
  logic [TAPS_W-1:0]  len  [NBLOCKS];
  logic [TAPS_W-1:0]  ntap [NBLOCKS];
  logic [ENTRY_W-1:0] outa [NBLOCKS];

  logic [OFF_W-1:0]   s_cnt, c_cnt;
  logic [CNT_W-1:0]   smp_cnt;

  logic [STAGE_W-1:0] st, st_next;
  logic [OFF_W-1:0]   s_off, c_off, s_dec;
  logic               s_lsb, c_lsb;
  logic [CNT_W-1:0]   dec_mask;

  assign st      = cmd.stage;
  assign st_next = cmd.stage + 1'b1;
  assign taps    = ntap[st];

  always_comb begin
    s_off = cmd.load ? swa[st] : s_cnt;
    c_off = cmd.load ? '0      : c_cnt;
    s_dec = (s_off == '0) ? OFF_W'(len[st] - 1'b1) : s_off - 1'b1;
    unique case (cmd.pass)
      PASS_LM: {c_lsb, s_lsb} = 2'b01;
      PASS_ML: {c_lsb, s_lsb} = 2'b10;
      default: {c_lsb, s_lsb} = 2'b11;
    endcase
  end

  assign s_raddr = {st, s_off, s_lsb};
  assign c_raddr = {st, c_off, c_lsb};

  always_comb begin
    unique case (cmd.wr)
      WR_INPUT:  s_wentry = {STAGE_W'(0), swa[0]};
      WR_OUTPUT: s_wentry = outa[st];
      WR_NEXT:   s_wentry = {st_next, swa[st_next]};
      default:   s_wentry = outa[st];
    endcase
  end

  assign dec_mask = CNT_W'((1 << mode.dec_log2[st]) - 1);
  assign dec_end  = (smp_cnt & dec_mask) == dec_mask;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_cnt   <= '0;
      c_cnt   <= '0;
      smp_cnt <= '0;
    end else begin
      if (cmd.rd) begin
        s_cnt <= s_dec;
        c_cnt <= c_off + 1'b1;
      end
      if (cmd.done) smp_cnt <= smp_cnt + 1'b1;
    end
  end

  // Address memory.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < NBLOCKS; b++) begin
        swa[b]  <= '0;
        len[b]  <= (b == 0) ? TAPS_W'(BLK_ENTRIES - 8) : TAPS_W'(BLK_ENTRIES);
        ntap[b] <= TAPS_W'(100);
        outa[b] <= ENTRY_W'(BLK_ENTRIES - 8 + b);
      end
    end else if (am_we) begin
      unique case (am_field)
        AM_SWA:  swa[am_stage]  <= am_data[OFF_W-1:0];
        AM_LEN:  len[am_stage]  <= am_data[TAPS_W-1:0];
        AM_TAPS: ntap[am_stage] <= am_data[TAPS_W-1:0];
        default: outa[am_stage] <= am_data;
      endcase
    end else if (cmd.ptr_upd && dec_end) begin
      swa[st] <= (swa[st] == OFF_W'(len[st] - 1'b1)) ? '0 : swa[st] + 1'b1;
    end
  end

  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
      am_we && (am_field == AM_LEN || am_field == AM_TAPS) |-> int'(am_data) >= 1 && int'(am_data) <= BLK_ENTRIES)
    else $error("LEN/TAPS must be 1..128");

endmodule
