// roba_ks_adder_tb: self-checking testbench for roba_ks_adder.
//
// A 64-bit instance is driven with random operands, long carry chains
// (all-ones plus one) and both carry-in values; a 5-bit instance (width not a
// power of two) is checked exhaustively. Sums are compared with the built-in
// addition.
module roba_ks_adder_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] a, b, s;
  logic        ci, co;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;

  roba_ks_adder #(.W(64)) dut   (.a_i(a),  .b_i(b),  .cin_i(ci),  .sum_o(s),  .cout_o(co));
  roba_ks_adder #(.W(5))  dut5  (.a_i(a5), .b_i(b5), .cin_i(ci5), .sum_o(s5), .cout_o(co5));

  task automatic check(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] e;
    a = x; b = y; ci = c;
    #1;
    e = 65'(x) + 65'(y) + 65'(c);
    checks++;
    if ({co, s} !== e) begin
      failures++;
      $display("FAIL a=%h b=%h ci=%b got %b_%h exp %h", x, y, c, co, s, e);
    end
  endtask

  initial begin
    check('1, 64'd1, 1'b0);
    check('1, 64'd0, 1'b1);
    check('1, '1, 1'b1);
    check(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    for (int i = 0; i < 20000; i++)
      check({32'($urandom), 32'($urandom)}, {32'($urandom), 32'($urandom)}, 1'($urandom));
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          logic [5:0] e5;
          a5 = 5'(x); b5 = 5'(y); ci5 = 1'(c);
          #1;
          e5 = 6'(x) + 6'(y) + 6'(c);
          checks++;
          if ({co5, s5} !== e5) begin
            failures++;
            $display("FAIL W=5 %0d+%0d+%0d got %0d", x, y, c, {co5, s5});
          end
        end
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
