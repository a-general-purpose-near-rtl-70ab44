// tb_pe: self-checking testbench for the processing element.
//
// Runs random accumulation sequences in every datapath pattern (MAC with
// partial sum, MUL, ALU ops, SED) with random lengths, signs, shifts and a share
// of zero operands, and compares each result with a reference model computed in
// the testbench. Also checks the two-cycle latency from the last beat to
// res_valid, that zero operands in MAC mode gate the multiplier, and that a
// disabled PE produces nothing.
module tb_pe;
  import ndp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge, so every register sees reset
  always #5 clk = ~clk;

  logic en, msb_part, a_signed, b_signed, valid, first, last, res_valid, zero_skip;
  dp_e dp; op_e opcode;
  logic [4:0] shift;
  logic [1:0] tag, res_tag;
  logic [7:0] a, b;
  logic [31:0] psum, res;

  pe #(.TAG_W(2)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, zero_seen = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (zero_skip) zero_seen <= zero_seen + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sx(logic [7:0] v, logic s);
    return s ? longint'($signed(v)) : longint'(v);
  endfunction

  function automatic logic [7:0] alu_ref(op_e o, logic [7:0] x, logic [7:0] y, logic s);
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_MAX: return (sx(x, s) > sx(y, s)) ? x : y;
      OP_MIN: return (sx(x, s) < sx(y, s)) ? x : y;
      OP_NOT: return ~x;
      OP_SHL: return x << y[2:0];
      default: return 8'(sx(x, s) >>> y[2:0]);
    endcase
  endfunction

  task automatic run_seq(dp_e d, op_e o, int n, bit zeros);
    longint acc = 0;
    logic [31:0] exp32;
    int t_last;
    logic [31:0] p = $urandom();
    dp = d; opcode = o;
    a_signed = (d == DP_SED) ? 1'b0 : 1'($urandom_range(0, 1));
    b_signed = a_signed;
    shift = 5'($urandom_range(0, 6));
    msb_part = (d == DP_MAC) ? 1'($urandom_range(0, 3) == 0) : 1'b0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      a = 8'($urandom()); b = 8'($urandom());
      if (zeros && $urandom_range(0, 2) == 0) begin
        if ($urandom_range(0, 1) == 1) a = 0; else b = 0;
      end
      valid = 1; first = (i == 0); last = (i == n - 1); psum = p; tag = 2'(i);
      case (d)
        DP_MAC: acc = ((i == 0) ? longint'($signed(p)) : acc) + sx(a, a_signed) * sx(b, b_signed);
        DP_SED: acc = ((i == 0) ? 0 : acc) + (sx(a, 0) - sx(b, 0)) * (sx(a, 0) - sx(b, 0));
        DP_MUL: acc = sx(a, a_signed) * sx(b, b_signed);
        default: acc = a_signed ? longint'($signed(alu_ref(o, a, b, a_signed)))
                                : longint'(alu_ref(o, a, b, a_signed));
      endcase
      if (d == DP_MUL || d == DP_ALU) begin
        // single-beat operations: every beat is first and last
        first = 1; last = 1;
      end
    end
    t_last = cycle;
    @(negedge clk);
    valid = 0; first = 0; last = 0;
    exp32 = msb_part ? (32'(acc) << 8) : 32'(longint'($signed(32'(acc))) >>> shift);
    while (!res_valid && cycle < t_last + 10) @(negedge clk);
    checks++;
    if (!res_valid || res !== exp32) begin
      failures++;
      $display("FAIL dp=%0d op=%0d n=%0d res=%h exp=%h v=%0d", d, o, n, res, exp32, res_valid);
    end
    checks++;
    if (cycle - t_last != 2) begin
      failures++;
      $display("FAIL latency %0d", cycle - t_last);
    end
  endtask

  initial begin
    en = 1; valid = 0; first = 0; last = 0; a = 0; b = 0; psum = 0; tag = 0;
    dp = DP_MAC; opcode = OP_ADD; shift = 0; msb_part = 0; a_signed = 1; b_signed = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) run_seq(DP_MAC, OP_ADD, $urandom_range(1, 30), 1);
    for (int k = 0; k < 30; k++) run_seq(DP_SED, OP_ADD, $urandom_range(1, 8), 0);
    for (int k = 0; k < 30; k++) run_seq(DP_MUL, OP_ADD, 1, 0);
    for (int k = 0; k < 60; k++) run_seq(DP_ALU, op_e'($urandom_range(0, 9)), 1, 0);
    // zero gating must have happened
    checks++;
    if (zero_seen == 0) begin failures++; $display("FAIL no zero-gated beat"); end
    // a disabled PE produces no result
    en = 0;
    @(negedge clk); valid = 1; first = 1; last = 1; dp = DP_MAC;
    @(negedge clk); valid = 0;
    repeat (4) begin
      @(negedge clk);
      checks++;
      if (res_valid) begin failures++; $display("FAIL disabled PE produced a result"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
