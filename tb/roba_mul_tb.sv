// roba_mul_tb: self-checking testbench for roba_mul, all three variants.
//
// 8-bit instances of S-RoBA, AS-RoBA and U-RoBA are checked over all 65536
// operand pairs; 32-bit instances (the default width) over random pairs,
// operands of the forms 3*2^k and 2^k +- 1, zero and the extremes. The expected
// values come from roba_ref_pkg, which evaluates Ar*B + Br*A - Ar*Br with wide
// integers. A few hand-worked values are checked as well:
//   3 x 6:  Ar = 2, Br = 8  -> 2*6 + 8*3 - 16 = 20 (exact 18)
//   5 x 7:  Ar = 4, Br = 8  -> 4*7 + 8*5 - 32 = 36 (exact 35)
//   -3 x 6 (S-RoBA) -> -20, (AS-RoBA) -> -21.
module roba_mul_tb;
  import roba_pkg::*;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8;
  logic [15:0] p8 [3];
  logic [31:0] a32, b32;
  logic [63:0] p32 [3];

  roba_mul #(.N(8), .VARIANT(ROBA_SIGNED))        d8s  (.a_i(a8), .b_i(b8), .p_o(p8[REF_S]));
  roba_mul #(.N(8), .VARIANT(ROBA_SIGNED_APPROX)) d8as (.a_i(a8), .b_i(b8), .p_o(p8[REF_AS]));
  roba_mul #(.N(8), .VARIANT(ROBA_UNSIGNED))      d8u  (.a_i(a8), .b_i(b8), .p_o(p8[REF_U]));
  roba_mul #(.VARIANT(ROBA_SIGNED))               d32s  (.a_i(a32), .b_i(b32), .p_o(p32[REF_S]));
  roba_mul #(.VARIANT(ROBA_SIGNED_APPROX))        d32as (.a_i(a32), .b_i(b32), .p_o(p32[REF_AS]));
  roba_mul #(.VARIANT(ROBA_UNSIGNED))             d32u  (.a_i(a32), .b_i(b32), .p_o(p32[REF_U]));

  task automatic check32(input logic [31:0] a, input logic [31:0] b);
    a32 = a; b32 = b;
    #1;
    for (int v = 0; v < 3; v++) begin
      logic [127:0] e;
      e = ref_roba(64'(a), 64'(b), 32, v);
      checks++;
      if (p32[v] !== e[63:0]) begin
        failures++;
        $display("FAIL N=32 variant=%0d a=%h b=%h got %h exp %h", v, a, b, p32[v], e[63:0]);
      end
    end
  endtask

  task automatic check_value(input logic [31:0] a, input logic [31:0] b, input int v,
                             input longint expv);
    a32 = a; b32 = b;
    #1;
    checks++;
    if (p32[v] !== 64'(expv)) begin
      failures++;
      $display("FAIL hand value variant=%0d a=%0d b=%0d got %0d exp %0d", v, $signed(a),
               $signed(b), $signed(p32[v]), expv);
    end
  endtask

  initial begin
    check_value(32'd3, 32'd6, REF_S, 20);
    check_value(32'd3, 32'd6, REF_U, 20);
    check_value(32'd5, 32'd7, REF_S, 36);
    check_value(-32'sd3, 32'd6, REF_S, -20);
    check_value(-32'sd3, 32'd6, REF_AS, -21);
    check_value(32'd3, 32'd6, REF_AS, 20);

    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        #1;
        for (int v = 0; v < 3; v++) begin
          logic [127:0] e;
          e = ref_roba(64'(a), 64'(b), 8, v);
          checks++;
          if (p8[v] !== e[15:0]) begin
            failures++;
            if (failures < 20)
              $display("FAIL N=8 variant=%0d a=%0d b=%0d got %h exp %h", v, a, b, p8[v], e[15:0]);
          end
        end
      end

    check32(0, 0); check32('1, '1); check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h7fff_ffff, 32'h8000_0000); check32(32'hc000_0000, 32'hbfff_ffff);
    for (int k = 0; k < 31; k++) begin
      check32(32'(3) << k, (32'(3) << k) - 1);
      check32((32'(1) << k) + 1, -((32'(1) << k) - 1));
    end
    for (int i = 0; i < 20000; i++)
      check32($urandom >> ($urandom % 32), $urandom >> ($urandom % 32));
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
