// fir_control: FIR Control Logic. Sequences every MAC unit and the address
// processing unit for one input sample, with three cooperating state machines:
//
//  * CASC STATE - idle, or running stage `stage` of the cascade; the number of
//    stages (1..4) comes from the mode register (last_stage).
//  * FIR STATE  - the three multiplication passes of a stage, T cycles each
//    (T = TAPS of the stage): LSW*MSW, MSW*LSW, MSW*MSW, then DRAIN for the
//    two cycles the MAC pipeline needs before the accumulator holds the result.
//  * WR STATE   - INPUT: new sample into block 0; OUTPUT: result into the
//    reserved output space, with the write address of the filtered block
//    advanced (decimated); NEXT: result into the following block.
//
// Sequence for one sample (accepted in an idle cycle with in_valid):
//   INPUT, then for every stage s: 3*T_s fetch cycles, 2 drain cycles, OUTPUT,
//   and NEXT unless s is the last stage. The unit is ready again in the cycle
//   after the last OUTPUT, so one sample takes
//   2 + sum_s (3*T_s + 3) + (stages - 1) cycles from acceptance to acceptance.
// out_valid pulses in every OUTPUT cycle, with the stage number, while the
// MAC results are valid; out_final marks the last stage's real (decimated)
// results. A sample arriving while busy is dropped and flagged by overrun.
// The mode register is written by the host (mode_we) and should only be
// changed while idle. Reset value: 4 stages, no decimation. While rst_n is
// low no sample-memory write is issued, so block RAM contents survive reset.
// The three state machines and the order input write / filter / write-back
// follow the architecture; the handshake, the overrun flag, the result strobes
// and the mode register encoding are choices of this design.
module fir_control
  import fir_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  output logic              in_accept,   // the sample on the input is taken this cycle
  output logic              overrun,
  input  logic              mode_we,
  input  mode_t             mode_wdata,
  output mode_t             mode,
  input  logic [TAPS_W-1:0] taps,        // TAPS of the current stage, from the APU
  input  logic              dec_end,     // from the APU
  output apu_cmd_t          apu_cmd,
  output mac_ctrl_t         mac_ctrl,
  output logic              out_valid,
  output logic [STAGE_W-1:0] out_stage,
  output logic              out_final,
  output logic              busy
);

  typedef enum logic [0:0] {C_IDLE, C_RUN} casc_e;
  typedef enum logic [2:0] {F_IDLE, F_LM, F_ML, F_MM, F_DRAIN} fir_e;
  typedef enum logic [1:0] {W_IDLE, W_INPUT, W_OUTPUT, W_NEXT} wr_e;

  casc_e              casc_q;
  fir_e               fir_q;
  wr_e                wr_q;
  logic [STAGE_W-1:0] stage_q;
  logic [TAPS_W-1:0]  tap_q;
  logic [1:0]         drain_q;

  logic fetching, last_tap, last_stage;

  assign fetching   = (fir_q == F_LM) || (fir_q == F_ML) || (fir_q == F_MM);
  assign last_tap   = (tap_q == taps - 1'b1);
  assign last_stage = (stage_q == mode.last_stage);

  assign in_ready  = (casc_q == C_IDLE);
  assign in_accept = in_valid && in_ready;
  assign overrun   = in_valid && !in_ready;
  assign busy      = !in_ready;

  // Mode register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode.last_stage <= STAGE_W'(NBLOCKS - 1);
      mode.dec_log2   <= '0;
    end else if (mode_we) begin
      mode <= mode_wdata;
    end
  end

  // The three state machines.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      casc_q  <= C_IDLE;
      fir_q   <= F_IDLE;
      wr_q    <= W_IDLE;
      stage_q <= '0;
      tap_q   <= '0;
      drain_q <= '0;
    end else begin
      // CASC STATE
      if (in_accept) begin
        casc_q  <= C_RUN;
        stage_q <= '0;
      end else if (wr_q == W_OUTPUT && last_stage) begin
        casc_q  <= C_IDLE;
      end else if (wr_q == W_NEXT) begin
        stage_q <= stage_q + 1'b1;
      end

      // FIR STATE
      unique case (fir_q)
        F_LM, F_ML, F_MM: begin
          if (last_tap) begin
            tap_q <= '0;
            unique case (fir_q)
              F_LM:    fir_q <= F_ML;
              F_ML:    fir_q <= F_MM;
              default: begin fir_q <= F_DRAIN; drain_q <= 2'(PIPE_LAT - 1); end
            endcase
          end else begin
            tap_q <= tap_q + 1'b1;
          end
        end
        F_DRAIN: begin
          drain_q <= drain_q - 1'b1;
          if (drain_q == 2'd1) fir_q <= F_IDLE;
        end
        default: if (wr_q == W_INPUT || wr_q == W_NEXT) begin
          fir_q <= F_LM;
          tap_q <= '0;
        end
      endcase

      // WR STATE
      unique case (wr_q)
        W_IDLE:   if (in_accept) wr_q <= W_INPUT;
                  else if (fir_q == F_DRAIN && drain_q == 2'd1) wr_q <= W_OUTPUT;
        W_INPUT:  wr_q <= W_IDLE;
        W_OUTPUT: wr_q <= last_stage ? W_IDLE : W_NEXT;
        default:  wr_q <= W_IDLE;
      endcase
    end
  end

  // Command outputs.
  always_comb begin
    apu_cmd.rd      = fetching;
    apu_cmd.load    = fetching && (tap_q == '0);
    unique case (fir_q)
      F_ML:    apu_cmd.pass = PASS_ML;
      F_MM:    apu_cmd.pass = PASS_MM;
      default: apu_cmd.pass = PASS_LM;
    endcase
    unique case (wr_q)
      W_INPUT:  apu_cmd.wr = WR_INPUT;
      W_OUTPUT: apu_cmd.wr = WR_OUTPUT;
      W_NEXT:   apu_cmd.wr = WR_NEXT;
      default:  apu_cmd.wr = WR_NONE;
    endcase
    apu_cmd.ptr_upd = (wr_q == W_OUTPUT);
    apu_cmd.done    = (wr_q == W_OUTPUT) && last_stage;
    apu_cmd.stage   = stage_q;

    mac_ctrl.rd     = fetching;
    mac_ctrl.first  = (fir_q == F_LM) && (tap_q == '0);
    mac_ctrl.scale  = (fir_q == F_MM) && (tap_q == '0);
    // No memory is written while reset is held, whatever the state registers hold.
    mac_ctrl.wr     = (wr_q != W_IDLE) && rst_n;
    mac_ctrl.wr_in  = (wr_q == W_INPUT);
  end

  assign out_valid = (wr_q == W_OUTPUT);
  assign out_stage = stage_q;
  assign out_final = out_valid && last_stage && dec_end;

  a_one_write_kind: assert property (@(posedge clk) disable iff (!rst_n) mac_ctrl.wr |-> !mac_ctrl.rd)
    else $error("write-back overlaps filtering");

endmodule
