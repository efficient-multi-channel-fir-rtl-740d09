// tb_dp_ram: self-checking test of the dual-port block memory. Random reads
// and writes on both ports are compared with a shadow array: one-cycle read
// latency, read-first behaviour on a port that writes, zero initial content,
// and port B winning a same-word write collision.
module tb_dp_ram;
  localparam int unsigned W = 18, D = 64, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] addr_a, addr_b;
  logic we_a, we_b;
  logic [W-1:0] din_a, din_b, dout_a, dout_b;
  logic [W-1:0] shadow [D];
  logic [W-1:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic [AW-1:0] aa, input logic wa, input logic [W-1:0] da,
                       input logic [AW-1:0] ab, input logic wb, input logic [W-1:0] db);
    @(negedge clk);
    addr_a = aa; we_a = wa; din_a = da;
    addr_b = ab; we_b = wb; din_b = db;
    exp_a = shadow[aa];
    exp_b = shadow[ab];
    if (wa) shadow[aa] = da;
    if (wb) shadow[ab] = db;
    @(negedge clk);
    we_a = 0; we_b = 0;
    checks += 2;
    if (dout_a !== exp_a) begin failures++; $display("A addr %0d: got %h exp %h", aa, dout_a, exp_a); end
    if (dout_b !== exp_b) begin failures++; $display("B addr %0d: got %h exp %h", ab, dout_b, exp_b); end
  endtask

  initial begin
    for (int i = 0; i < D; i++) shadow[i] = '0;
    we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // initial content is zero
    for (int i = 0; i < D; i += 2) cycle(AW'(i), 0, '0, AW'(i + 1), 0, '0);
    // both ports write in one cycle (a 32-bit value as two words)
    for (int i = 0; i < D; i += 2) cycle(AW'(i), 1, W'($urandom), AW'(i + 1), 1, W'($urandom));
    // random mix, including collisions
    for (int n = 0; n < 2000; n++) begin
      logic [AW-1:0] aa, ab;
      aa = AW'($urandom);
      ab = ($urandom % 8 == 0) ? aa : AW'($urandom);
      cycle(aa, 1'($urandom), W'($urandom), ab, 1'($urandom), W'($urandom));
    end
    // read everything back
    for (int i = 0; i < D; i++) cycle(AW'(i), 0, '0, AW'(D - 1 - i), 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
