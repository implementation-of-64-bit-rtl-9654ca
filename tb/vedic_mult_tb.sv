// Self-checking testbench for vedic_mult.
//
// Instances at N = 4 and N = 8 are checked exhaustively; N = 16 and N = 32
// (the 32 x 32 multiplier built from 16 x 16 blocks) get corner operands
// (zero, one, all ones, single bits, alternating bits) and random ones.
// Reference: the simulator's integer multiplication. The default N = 64 is
// one more level of the same recursion; it is exercised inside mac_top by
// mac_top_tb, which keeps this testbench's build time short.
module vedic_mult_tb;
  int checks = 0, failures = 0;

  logic [3:0]   a4, b4;   logic [7:0]   p4;
  logic [7:0]   a8, b8;   logic [15:0]  p8;
  logic [15:0]  a16, b16; logic [31:0]  p16;
  logic [31:0]  a32, b32; logic [63:0]  p32;

  vedic_mult #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mult #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mult #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));

  // Corner operand k of 8 for a w-bit word.
  function automatic logic [63:0] corner(int k, int w);
    logic [63:0] m;
    m = (w == 64) ? '1 : ((64'd1 << w) - 1);
    case (k)
      0: return 64'd0;
      1: return 64'd1;
      2: return m;
      3: return m >> 1;
      4: return (64'd1 << (w - 1));
      5: return {32{2'b10}} & m;
      6: return {32{2'b01}} & m;
      default: return m - 1;
    endcase
  endfunction

  task automatic check_wide();
    logic [31:0]  r16;
    logic [63:0]  r32;
    #1;
    r16 = 32'(a16) * 32'(b16);
    r32 = 64'(a32) * 64'(b32);
    checks += 2;
    if (p16 !== r16) begin failures++; $display("FAIL N=16 %h * %h = %h, expected %h", a16, b16, p16, r16); end
    if (p32 !== r32) begin failures++; $display("FAIL N=32 %h * %h = %h, expected %h", a32, b32, p32, r32); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = i[3:0]; b4 = j[3:0];
        #1;
        checks++;
        if (int'(p4) != i * j) begin failures++; $display("FAIL N=4 %0d * %0d = %0d", i, j, p4); end
      end
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = i[7:0]; b8 = j[7:0];
        #1;
        checks++;
        if (int'(p8) != i * j) begin failures++; $display("FAIL N=8 %0d * %0d = %0d", i, j, p8); end
      end
    end
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a16 = 16'(corner(i, 16)); b16 = 16'(corner(j, 16));
        a32 = 32'(corner(i, 32)); b32 = 32'(corner(j, 32));
        check_wide();
      end
    end
    for (int n = 0; n < 3000; n++) begin
      a16 = 16'($urandom()); b16 = 16'($urandom());
      a32 = $urandom();      b32 = $urandom();
      check_wide();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
