// roba_barrel_shifter_tb: self-checking testbench for roba_barrel_shifter.
//
// Checks the two shapes the multiplier uses: 32-bit data by a 32-bit one-hot
// value (signed variants) and 33-bit data by a 33-bit one-hot value (U-RoBA,
// where a shift by 32 of 2^32 wraps to zero in 64 bits). Every shift amount is
// used with random data, plus a zero power value. The expected value is the
// plain product truncated to 64 bits.
module roba_barrel_shifter_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] d32, p32;
  logic [63:0] q32;
  logic [32:0] d33, p33;
  logic [63:0] q33;

  roba_barrel_shifter #(.DW(32), .PW(32), .OW(64)) dut32 (.d_i(d32), .p_i(p32), .prod_o(q32));
  roba_barrel_shifter #(.DW(33), .PW(33), .OW(64)) dut33 (.d_i(d33), .p_i(p33), .prod_o(q33));

  initial begin
    for (int rep = 0; rep < 200; rep++) begin
      for (int s = -1; s < 33; s++) begin
        logic [127:0] e32, e33;
        d32 = $urandom;
        d33 = {1'($urandom), 32'($urandom)};
        if (rep == 0) d33 = 33'h1_0000_0000;
        p32 = (s >= 0 && s < 32) ? (32'(1) << s) : '0;
        p33 = (s >= 0) ? (33'(1) << s) : '0;
        #1;
        e32 = 128'(d32) * 128'(p32);
        e33 = 128'(d33) * 128'(p33);
        checks += 2;
        if (q32 !== e32[63:0]) begin
          failures++;
          $display("FAIL 32 d=%h p=%h got %h exp %h", d32, p32, q32, e32[63:0]);
        end
        if (q33 !== e33[63:0]) begin
          failures++;
          $display("FAIL 33 d=%h p=%h got %h exp %h", d33, p33, q33, e33[63:0]);
        end
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
