// roba_sign_detector_tb: self-checking testbench for roba_sign_detector.
//
// An 8-bit instance is checked over all 65536 operand pairs and a 32-bit
// instance with random pairs plus the most negative value; expected absolute
// values and product signs come from integer arithmetic.
module roba_sign_detector_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, aa8, ab8;
  logic        n8;
  logic [31:0] a32, b32, aa32, ab32;
  logic        n32;

  roba_sign_detector #(.N(8))  dut8  (.a_i(a8),  .b_i(b8),  .abs_a_o(aa8),  .abs_b_o(ab8),  .neg_o(n8));
  roba_sign_detector #(.N(32)) dut32 (.a_i(a32), .b_i(b32), .abs_a_o(aa32), .abs_b_o(ab32), .neg_o(n32));

  function automatic longint iabs(input longint v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic check32(input logic [31:0] a, input logic [31:0] b);
    longint sa, sb;
    a32 = a; b32 = b;
    #1;
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    checks++;
    if (aa32 !== 32'(iabs(sa)) || ab32 !== 32'(iabs(sb)) || n32 !== ((sa < 0) != (sb < 0))) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h got %h %h %b", a, b, aa32, ab32, n32);
    end
  endtask

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        #1;
        checks++;
        if (aa8 !== 8'(iabs(a)) || ab8 !== 8'(iabs(b)) || n8 !== ((a < 0) != (b < 0))) begin
          failures++;
          $display("FAIL N=8 a=%0d b=%0d got %0d %0d %b", a, b, aa8, ab8, n8);
        end
      end
    end
    check32(32'h8000_0000, 32'h7fff_ffff);
    check32(32'hffff_ffff, 32'h0);
    for (int i = 0; i < 10000; i++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
