// roba_sign_set_tb: self-checking testbench for roba_sign_set.
//
// Drives the exact (S-RoBA) and approximate (AS-RoBA) forms with the same
// random magnitudes and both signs. Expected values: the magnitude when
// positive; -X when negative and exact; -X - 1 when negative and approximate.
module roba_sign_set_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] m, ye, ya;
  logic        n;

  roba_sign_set #(.W(64), .EXACT(1'b1)) dut_exact  (.mag_i(m), .neg_i(n), .y_o(ye));
  roba_sign_set #(.W(64), .EXACT(1'b0)) dut_approx (.mag_i(m), .neg_i(n), .y_o(ya));

  task automatic check(input logic [63:0] x, input logic s);
    logic [63:0] ee, ea;
    m = x; n = s;
    #1;
    ee = s ? 64'(0) - x : x;
    ea = s ? 64'(0) - x - 64'(1) : x;
    checks += 2;
    if (ye !== ee) begin
      failures++;
      $display("FAIL exact m=%h neg=%b got %h exp %h", x, s, ye, ee);
    end
    if (ya !== ea) begin
      failures++;
      $display("FAIL approx m=%h neg=%b got %h exp %h", x, s, ya, ea);
    end
  endtask

  initial begin
    check(0, 0); check(0, 1); check(1, 1); check(64'd20, 1);
    for (int i = 0; i < 10000; i++)
      check({32'($urandom), 32'($urandom)} >> ($urandom % 64), 1'($urandom));
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
