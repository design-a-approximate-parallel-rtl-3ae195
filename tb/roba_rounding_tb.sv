// roba_rounding_tb: self-checking testbench for roba_rounding.
//
// Checks an 8-bit instance with a 9-bit output (unsigned use) and an 8-bit
// instance with an 8-bit output (signed-magnitude use, inputs up to 2^7)
// exhaustively, and a 32-bit instance with random values and the corner cases
// 0, 1, 2, 3, 3*2^k, 3*2^k - 1 and all-ones, against roba_ref_pkg::ref_round.
module roba_rounding_tb;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  x8;
  logic [8:0]  r8w;
  logic [7:0]  r8n;
  logic [31:0] x32;
  logic [32:0] r32;

  roba_rounding #(.N(8),  .OW(9))  dut8w (.x_i(x8),  .r_o(r8w));
  roba_rounding #(.N(8),  .OW(8))  dut8n (.x_i(x8),  .r_o(r8n));
  roba_rounding #(.N(32), .OW(33)) dut32 (.x_i(x32), .r_o(r32));

  task automatic check32(input logic [31:0] v);
    logic [64:0] e;
    x32 = v;
    #1;
    e = ref_round(64'(v));
    checks++;
    if (r32 !== e[32:0]) begin
      failures++;
      $display("FAIL N=32 x=%h got %h exp %h", v, r32, e[32:0]);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [64:0] e;
      x8 = 8'(v);
      #1;
      e = ref_round(64'(v));
      checks++;
      if (r8w !== e[8:0]) begin
        failures++;
        $display("FAIL N=8 OW=9 x=%0d got %b exp %b", v, r8w, e[8:0]);
      end
      if (v <= 128) begin
        checks++;
        if (r8n !== e[7:0]) begin
          failures++;
          $display("FAIL N=8 OW=8 x=%0d got %b exp %b", v, r8n, e[7:0]);
        end
      end
    end
    check32(0); check32(1); check32(2); check32(3); check32('1);
    for (int k = 0; k < 31; k++) begin
      check32(32'(3) << k);
      check32((32'(3) << k) - 1);
      check32((32'(3) << k) + 1);
    end
    for (int i = 0; i < 20000; i++) check32($urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
