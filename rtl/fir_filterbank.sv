// fir_filterbank: multi-channel FIR filter bank built from CHANNELS MAC units
// (one multiplier, one sample memory and one coefficient memory each) that
// run in lock-step under one FIR Control Logic and one Address Processing
// Unit. Every channel applies up to four cascaded FIR stages (optionally
// decimating) to its own 32-bit input stream, with its own 32-bit
// coefficients; the multiplication is done in three 18x18 passes per tap.
//
// Interface (all synchronous to clk, active-low synchronous reset):
//  * in_valid/in_data/in_ready: one sample per channel is accepted in a cycle
//    with in_valid && in_ready; it is registered and written into block 0 of
//    every sample memory in the next cycle. in_valid while busy is dropped
//    and reported on overrun.
//  * out_valid/out_stage/out_final/out_data: every stage's result, once per
//    stage per input sample; out_final marks the real output of the last stage
//    (with decimation, only every 2^dec_log2[last] input samples).
//    The same result is also stored in the stage's reserved output entry.
//  * cw_*: host writes a 32-bit coefficient at entry cw_entry (word pair)
//    of the coefficient memories selected by cw_mask; only while in_ready.
//  * am_*: host writes one address-memory field (see fir_pkg::am_field_e).
//  * mode_*: host writes the mode register (stages, decimation per block).
//  * hr_*: host reads word hr_addr of channel hr_ch's sample (hr_coef=0) or
//    coefficient (hr_coef=1) memory; data one cycle later. Reads are valid
//    while in_ready.
// Sample processing time: 2 + sum_s (3*TAPS_s + 3) + (stages-1) cycles, e.g.
// 1217 cycles for four 100-tap stages - inside the 1600-cycle budget of a
// 100 kHz stream at 160 MHz. The number of channels is this design's choice.
module fir_filterbank
  import fir_pkg::*;
#(
  parameter int unsigned CHANNELS = 8,
  localparam int unsigned CH_W    = (CHANNELS > 1) ? $clog2(CHANNELS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [CHANNELS-1:0][DATA_W-1:0]   in_data,
  output logic                              in_ready,
  output logic                              overrun,
  output logic                              out_valid,
  output logic [STAGE_W-1:0]                out_stage,
  output logic                              out_final,
  output logic [CHANNELS-1:0][DATA_W-1:0]   out_data,
  input  logic                              cw_en,
  input  logic [CHANNELS-1:0]               cw_mask,
  input  logic [ENTRY_W-1:0]                cw_entry,
  input  logic [DATA_W-1:0]                 cw_data,
  input  logic                              am_we,
  input  logic [STAGE_W-1:0]                am_stage,
  input  am_field_e                         am_field,
  input  logic [ENTRY_W-1:0]                am_data,
  input  logic                              mode_we,
  input  mode_t                             mode_wdata,
  input  logic [CH_W-1:0]                   hr_ch,
  input  logic                              hr_coef,
  input  logic [ADDR_W-1:0]                 hr_addr,
  output logic [WORD_W-1:0]                 hr_data
);

  apu_cmd_t          apu_cmd;
  mac_ctrl_t         mac_ctrl;
  mode_t             mode;
  logic [TAPS_W-1:0] taps;
  logic              dec_end, in_accept, busy;
  logic [ADDR_W-1:0] s_raddr, c_raddr;
  logic [ENTRY_W-1:0] s_wentry;
  logic [CHANNELS-1:0][DATA_W-1:0] in_q;
  logic [CHANNELS-1:0][WORD_W-1:0] hr_s, hr_c;
  logic [CH_W-1:0]   hr_ch_q;
  logic              hr_coef_q;

  fir_control u_fcl (
    .clk, .rst_n, .in_valid, .in_ready, .in_accept, .overrun,
    .mode_we, .mode_wdata, .mode, .taps, .dec_end,
    .apu_cmd, .mac_ctrl, .out_valid, .out_stage, .out_final, .busy
  );

  apu u_apu (
    .clk, .rst_n, .cmd(apu_cmd), .mode, .am_we, .am_stage, .am_field, .am_data,
    .s_raddr, .c_raddr, .s_wentry, .taps, .dec_end
  );

  always_ff @(posedge clk) begin
    if (in_accept) in_q <= in_data;
    hr_ch_q   <= hr_ch;
    hr_coef_q <= hr_coef;
  end

  for (genvar ch = 0; ch < CHANNELS; ch++) begin : g_mac
    mac_unit u_mac (
      .clk, .rst_n, .ctrl(mac_ctrl), .s_raddr, .c_raddr, .s_wentry,
      .in_sample (in_q[ch]),
      .cw_en     (cw_en && cw_mask[ch]),
      .cw_entry, .cw_data, .hr_addr,
      .hr_sdata  (hr_s[ch]),
      .hr_cdata  (hr_c[ch]),
      .result    (out_data[ch])
    );
  end

  assign hr_data = hr_coef_q ? hr_c[hr_ch_q] : hr_s[hr_ch_q];

  a_cw_idle: assert property (@(posedge clk) disable iff (!rst_n) cw_en |-> !busy)
    else $error("coefficient write while busy");

endmodule
