// Self-checking testbench for ksa_adder.
//
// Three instances: W = 4 checked exhaustively over a, b and cin (including
// the worked example A = 1011, B = 1100, cin = 0 -> S = 0111, cout = 1),
// the default W = 16, and W = 129 (the width used inside a 64-bit
// multiplier), both with random operands and carry-chain edge cases.
// Reference: the simulator's own integer addition.
module ksa_adder_tb;
  int checks = 0, failures = 0;

  logic [3:0]   a4, b4, s4;
  logic         c4, co4;
  logic [15:0]  a16, b16, s16;
  logic         c16, co16;
  logic [128:0] a129, b129, s129;
  logic         c129, co129;

  ksa_adder #(.W(4))   dut4   (.a(a4),   .b(b4),   .cin(c4),   .sum(s4),   .cout(co4));
  ksa_adder            dut16  (.a(a16),  .b(b16),  .cin(c16),  .sum(s16),  .cout(co16));
  ksa_adder #(.W(129)) dut129 (.a(a129), .b(b129), .cin(c129), .sum(s129), .cout(co129));

  function automatic logic [128:0] rand129();
    return {$urandom(), $urandom(), $urandom(), $urandom(), 1'($urandom())};
  endfunction

  task automatic check16();
    logic [16:0] ref16;
    #1;
    ref16 = {1'b0, a16} + {1'b0, b16} + 17'(c16);
    checks++;
    if ({co16, s16} !== ref16) begin
      failures++;
      $display("FAIL W=16 %h + %h + %b = %h, expected %h", a16, b16, c16, {co16, s16}, ref16);
    end
  endtask

  task automatic check129();
    logic [129:0] ref129;
    #1;
    ref129 = {1'b0, a129} + {1'b0, b129} + 130'(c129);
    checks++;
    if ({co129, s129} !== ref129) begin
      failures++;
      $display("FAIL W=129 %h + %h + %b = %h, expected %h", a129, b129, c129, {co129, s129}, ref129);
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
    // Worked example.
    a4 = 4'b1011; b4 = 4'b1100; c4 = 1'b0;
    #1;
    checks++;
    if (s4 !== 4'b0111 || co4 !== 1'b1) begin
      failures++;
      $display("FAIL worked example: S=%b cout=%b", s4, co4);
    end
    // Exhaustive W = 4.
    for (int v = 0; v < 512; v++) begin
      {c4, a4, b4} = v[8:0];
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + c4)) begin
        failures++;
        $display("FAIL W=4 %b + %b + %b = %b", a4, b4, c4, {co4, s4});
      end
    end
    // W = 16: edge cases then random.
    a16 = '1; b16 = '0; c16 = 1'b1; check16();      // carry ripples through all bits
    a16 = '1; b16 = '1; c16 = 1'b1; check16();
    a16 = 16'h5555; b16 = 16'hAAAA; c16 = 1'b1; check16();
    a16 = '0; b16 = '0; c16 = 1'b0; check16();
    for (int n = 0; n < 2000; n++) begin
      a16 = 16'($urandom()); b16 = 16'($urandom()); c16 = 1'($urandom());
      check16();
    end
    // W = 129.
    a129 = '1; b129 = '0; c129 = 1'b1; check129();
    a129 = '1; b129 = '1; c129 = 1'b0; check129();
    a129 = {1'b0, {64{2'b01}}}; b129 = {1'b1, {64{2'b10}}}; c129 = 1'b1; check129();
    for (int n = 0; n < 2000; n++) begin
      a129 = rand129(); b129 = rand129(); c129 = 1'($urandom());
      check129();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
