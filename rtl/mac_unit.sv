// mac_unit: one channel of the filter bank - sample memory, coefficient
// memory, an 18x18 signed multiplier and a wide accumulator.
//
// A 32x32 product is formed from three 18x18 partial products. For a filter
// of T taps the control logic runs three passes of T cycles each:
//   pass 1: sum of C_LSW * S_MSW        pass 2: + sum of C_MSW * S_LSW
//   pass 3: (acc >>> 16) + sum of C_MSW * S_MSW
// so that acc = ((sum C_L*S_M + sum C_M*S_L) >>> 16) + sum C_M*S_M, about
// sum(C*S) / 2^32. The LSW*LSW product is left out. The accumulator feedback
// is the accumulator itself, or the accumulator scaled down by 16 bits on the
// first product of pass 3, or zero on the first product of a filter.
// The 32-bit result is sat32(acc << 1), i.e. coefficients are read as Q1.31
// fractions; this output scaling and the saturation are choices of this design.
//
// Timing: the operand addresses and ctrl.rd/first/scale are presented in
// cycle t; the memories deliver the words in t+1 (registered block RAM
// output), the product register loads at the end of t+1 and the accumulator
// at the end of t+2. `result` is therefore valid from cycle t+3 after the
// last fetch. The pipeline registers stand for the "simple pipeline stages"
// that keep the multiplier and adder off one critical path.
//
// Writes: ctrl.wr stores a 32-bit value (input sample or result) at entry
// s_wentry of the sample memory in one cycle, LSW through port A at the even
// word and MSW through port B at the odd word. Coefficients are written the
// same way by the host (cw_en), which must only happen while no filter runs.
// Port B of both memories otherwise serves host reads (hr_addr -> hr_*data,
// one cycle latency).
module mac_unit
  import fir_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  mac_ctrl_t           ctrl,
  input  logic [ADDR_W-1:0]   s_raddr,     // sample word to read (filtering)
  input  logic [ADDR_W-1:0]   c_raddr,     // coefficient word to read
  input  logic [ENTRY_W-1:0]  s_wentry,    // sample entry to write (ctrl.wr)
  input  logic [DATA_W-1:0]   in_sample,   // new input sample (ctrl.wr_in)
  input  logic                cw_en,       // host coefficient write
  input  logic [ENTRY_W-1:0]  cw_entry,
  input  logic [DATA_W-1:0]   cw_data,
  input  logic [ADDR_W-1:0]   hr_addr,     // host read word address
  output logic [WORD_W-1:0]   hr_sdata,    // sample memory word, one cycle later
  output logic [WORD_W-1:0]   hr_cdata,    // coefficient memory word, one cycle later
  output logic [DATA_W-1:0]   result       // saturated 32-bit accumulator result
);

  // ---------------- sample memory ----------------
  logic [DATA_W-1:0] s_wval;
  logic [ADDR_W-1:0] s_addr_a, s_addr_b;
  logic [WORD_W-1:0] s_dout_a;

  assign s_wval   = ctrl.wr_in ? in_sample : result;
  assign s_addr_a = ctrl.wr ? {s_wentry, 1'b0} : s_raddr;
  assign s_addr_b = ctrl.wr ? {s_wentry, 1'b1} : hr_addr;

  dp_ram #(.WIDTH(WORD_W), .DEPTH(1 << ADDR_W)) u_smem (
    .clk    (clk),
    .addr_a (s_addr_a), .we_a (ctrl.wr), .din_a (lsw_of(s_wval)), .dout_a (s_dout_a),
    .addr_b (s_addr_b), .we_b (ctrl.wr), .din_b (msw_of(s_wval)), .dout_b (hr_sdata)
  );

  // ---------------- coefficient memory ----------------
  logic [ADDR_W-1:0] c_addr_a, c_addr_b;
  logic [WORD_W-1:0] c_dout_a;

  assign c_addr_a = cw_en ? {cw_entry, 1'b0} : c_raddr;
  assign c_addr_b = cw_en ? {cw_entry, 1'b1} : hr_addr;

  dp_ram #(.WIDTH(WORD_W), .DEPTH(1 << ADDR_W)) u_cmem (
    .clk    (clk),
    .addr_a (c_addr_a), .we_a (cw_en), .din_a (lsw_of(cw_data)), .dout_a (c_dout_a),
    .addr_b (c_addr_b), .we_b (cw_en), .din_b (msw_of(cw_data)), .dout_b (hr_cdata)
  );

  // ---------------- multiplier and accumulator ----------------
  logic                     rd_d1, first_d1, scale_d1;
  logic                     rd_d2, first_d2, scale_d2;
  logic signed [PROD_W-1:0] prod_q;
  logic signed [ACC_W-1:0]  acc_q, acc_fb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {rd_d1, first_d1, scale_d1} <= '0;
      {rd_d2, first_d2, scale_d2} <= '0;
    end else begin
      {rd_d1, first_d1, scale_d1} <= {ctrl.rd, ctrl.first, ctrl.scale};
      {rd_d2, first_d2, scale_d2} <= {rd_d1, first_d1, scale_d1};
    end
  end

  always_ff @(posedge clk) begin
    prod_q <= PROD_W'($signed(s_dout_a) * $signed(c_dout_a));
  end

  always_comb begin
    if (first_d2)      acc_fb = '0;
    else if (scale_d2) acc_fb = acc_q >>> SCALE_SH;
    else               acc_fb = acc_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     acc_q <= '0;
    else if (rd_d2) acc_q <= acc_fb + ACC_W'(prod_q);
  end

  // ---------------- output scaling ----------------
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'(33'sh0_7FFF_FFFF);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(33'sh0_8000_0000);
  logic signed [ACC_W-1:0] acc_sh;

  always_comb begin
    acc_sh = acc_q <<< OUT_SHIFT;
    if (acc_sh > MAXV)      result = 32'h7FFF_FFFF;
    else if (acc_sh < MINV) result = 32'h8000_0000;
    else                    result = acc_sh[DATA_W-1:0];
  end

  // The coefficient port A cannot serve a host write and a filter read at once.
  a_no_cw_while_filtering: assert property (@(posedge clk) disable iff (!rst_n) !(cw_en && ctrl.rd))
    else $error("coefficient write while the filter is running");

endmodule
