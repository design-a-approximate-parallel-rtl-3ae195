// roba_subtractor_tb: self-checking testbench for roba_subtractor.
//
// Random 64-bit operand pairs in both orders, equal operands and the extremes,
// compared with the built-in subtraction modulo 2^64 and the unsigned
// comparison for the borrow.
module roba_subtractor_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] a, b, d;
  logic        bo;

  roba_subtractor #(.W(64)) dut (.a_i(a), .b_i(b), .diff_o(d), .borrow_o(bo));

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (d !== x - y || bo !== (y > x)) begin
      failures++;
      $display("FAIL a=%h b=%h got %h %b", x, y, d, bo);
    end
  endtask

  initial begin
    check(0, 0); check(0, 1); check('1, '1); check(0, '1); check('1, 0);
    check(64'd20, 64'd16);
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] x, y;
      x = {32'($urandom), 32'($urandom)};
      y = {32'($urandom), 32'($urandom)} >> ($urandom % 64);
      check(x, y);
      check(y, x);
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
