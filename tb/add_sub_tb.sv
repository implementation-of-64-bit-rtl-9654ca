// Self-checking testbench for add_sub at its default width (128 bits):
// corner cases (wrap-around in both directions, subtracting zero, equal
// operands) and random operands in both modes, checked against the
// simulator's modulo-2^128 addition and subtraction.
module add_sub_tb;
  import mac_pkg::*;

  localparam int unsigned W = 2 * MAC_N;

  logic [W-1:0] a, b, y, expected;
  op_e          op;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;

  add_sub dut (.a(a), .b(b), .op(op), .y(y));

  function automatic logic [W-1:0] rand_w();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  task automatic check();
    #1;
    expected = (op == OP_SUB) ? a - b : a + b;
    if (op == OP_SUB) n_sub++; else n_add++;
    checks++;
    if (y !== expected) begin
      failures++;
      $display("FAIL %s %h, %h -> %h, expected %h", op.name(), a, b, y, expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_ADD; a = '1; b = 1;  check();
    op = OP_ADD; a = '0; b = '0; check();
    op = OP_SUB; a = '0; b = 1;  check();
    op = OP_SUB; a = 5;  b = '0; check();
    op = OP_SUB; a = {W/2{2'b10}}; b = a; check();
    op = OP_SUB; a = '1; b = '1; check();
    for (int n = 0; n < 4000; n++) begin
      a  = rand_w();
      b  = rand_w();
      op = op_e'($urandom_range(0, 1));
      check();
    end
    checks++;
    if (n_add == 0 || n_sub == 0) begin
      failures++;
      $display("FAIL a mode was never exercised: add=%0d sub=%0d", n_add, n_sub);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
