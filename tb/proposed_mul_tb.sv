// proposed_mul_tb: end-to-end testbench of proposed_mul at its default size.
//
// The top is instantiated with no parameter override (32-bit operands). A new
// operand pair is applied after every rising edge and the three registered
// products are compared, one clock later, with the reference model
// (roba_ref_pkg). That checks the one-cycle latency and the one-pair-per-cycle
// rate as well as the values. The first pair is 3 x 6, then directed corner
// cases, then random pairs with random magnitudes.
//
// Each mechanism of the design is counted and must occur at least once:
// rounding up, rounding down, a tie 3*2^k rounded up, the exception 3 -> 2, a
// zero operand, a negative product through the sign set (exact and
// approximate), the most negative operand, an unsigned operand rounded to 2^32,
// and approximate results above, below and equal to the exact product.
module proposed_mul_tb;
  import roba_ref_pkg::*;

  localparam int N = 32;
  localparam int NRAND = 20000;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0]   a = '0, b = '0;
  logic [2*N-1:0] c, c_as, c_u;

  proposed_mul dut (.clk(clk), .a(a), .b(b), .c(c), .c_as(c_as), .c_u(c_u));

  // Mechanism counters.
  typedef enum int {
    M_ROUND_UP, M_ROUND_DOWN, M_TIE_UP, M_THREE, M_ZERO, M_NEG_EXACT, M_NEG_APPROX,
    M_MOST_NEG, M_U_TOP, M_ABOVE, M_BELOW, M_EQUAL, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"round up", "round down", "tie rounded up", "3 rounded to 2",
                                 "zero operand", "negative product, exact negation",
                                 "negative product, approximate negation",
                                 "most negative operand", "unsigned operand rounded to 2^32",
                                 "approximate above exact", "approximate below exact",
                                 "approximate equal to exact"};

  function automatic logic [63:0] sabs(input logic [N-1:0] x);
    return x[N-1] ? 64'(-longint'($signed(x))) : 64'(x);
  endfunction

  task automatic classify_operand(input logic [63:0] m);
    logic [64:0] r;
    r = ref_round(m);
    if (m == 0) mech[M_ZERO]++;
    else if (m == 3) mech[M_THREE]++;
    else if (r > 65'(m)) begin
      mech[M_ROUND_UP]++;
      if (65'(m) * 4 == r * 3) mech[M_TIE_UP]++;
    end else if (r < 65'(m)) mech[M_ROUND_DOWN]++;
  endtask

  task automatic classify(input logic [N-1:0] x, input logic [N-1:0] y);
    logic signed [127:0] exact, approx;
    classify_operand(sabs(x));
    classify_operand(sabs(y));
    if (x == {1'b1, {(N-1){1'b0}}} || y == {1'b1, {(N-1){1'b0}}}) mech[M_MOST_NEG]++;
    if ((x[N-1] && x[N-2]) || (y[N-1] && y[N-2])) mech[M_U_TOP]++;
    exact  = 128'(sabs(x)) * 128'(sabs(y));
    approx = 128'(ref_roba(64'(sabs(x)), 64'(sabs(y)), N, REF_U));
    if (approx > exact) mech[M_ABOVE]++;
    else if (approx < exact) mech[M_BELOW]++;
    else mech[M_EQUAL]++;
  endtask

  // Operand pairs applied so far, checked one cycle after they were applied.
  logic [N-1:0] qa [$], qb [$];

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    a <= x;
    b <= y;
    qa.push_back(x);
    qb.push_back(y);
    classify(x, y);
  endtask

  // Output checker: after each edge, the registers hold the products of the
  // pair applied one edge earlier.
  int applied_at_edge = -1;
  always @(posedge clk) begin
    #1;
    if (qa.size() > 0 && applied_at_edge >= 0) begin
      logic [N-1:0] x, y;
      logic [127:0] es, eas, eu;
      x = qa.pop_front();
      y = qb.pop_front();
      es  = ref_roba(64'(x), 64'(y), N, REF_S);
      eas = ref_roba(64'(x), 64'(y), N, REF_AS);
      eu  = ref_roba(64'(x), 64'(y), N, REF_U);
      checks += 3;
      // Sign set seen at work: a negative S-RoBA product, and an AS-RoBA
      // product that differs from it.
      if (c[2*N-1]) mech[M_NEG_EXACT]++;
      if (c_as != c) mech[M_NEG_APPROX]++;
      if (c !== es[63:0] || c_as !== eas[63:0] || c_u !== eu[63:0]) begin
        failures++;
        if (failures < 20)
          $display("FAIL a=%h b=%h c=%h/%h c_as=%h/%h c_u=%h/%h", x, y, c, es[63:0],
                   c_as, eas[63:0], c_u, eu[63:0]);
      end
    end
  end

  initial begin
    // 3 x 6 first.
    @(negedge clk);
    apply(32'd3, 32'd6);
    applied_at_edge = 0;
    @(negedge clk); apply(32'd0, 32'hdead_beef);
    @(negedge clk); apply(32'h8000_0000, 32'd5);
    @(negedge clk); apply(32'hc000_0001, 32'hffff_fff0);
    @(negedge clk); apply(-32'sd3, 32'd6);
    @(negedge clk); apply(32'd96, 32'd95);
    @(negedge clk); apply(32'd4, 32'd8);
    for (int k = 0; k < 31; k++) begin
      @(negedge clk); apply(32'(3) << k, -((32'(1) << k) + 1));
    end
    for (int i = 0; i < NRAND; i++) begin
      @(negedge clk);
      apply($urandom >> ($urandom % 32), $urandom >> ($urandom % 32));
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (qa.size() != 0) begin
      failures++;
      $display("FAIL %0d products not delivered one cycle after their operands", qa.size());
    end
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism '%s': %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism '%s' never exercised", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
