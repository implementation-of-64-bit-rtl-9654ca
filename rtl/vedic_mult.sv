// N x N unsigned Vedic multiplier (Urdhva-Tiryakbhyam sutra), recursive.
//
// Each operand is split into a most and a least significant half,
// A = {A_M, A_L} and B = {B_M, B_L}. The four half-size products are formed
// side by side, in one step and without shifting:
//   m0 = A_L x B_L   m1 = A_M x B_L   m2 = A_L x B_M   m3 = A_M x B_M
// and merged by three Kogge-Stone adders:
//   k1: t1 = m1 + m2                       (N bits plus carry)
//   k2: t2 = t1 + m0[N-1:N/2]              (N+1 bits)
//   k3: hi = m3 + t2[N:N/2]                (N bits)
// The product is P = {hi, t2[N/2-1:0], m0[N/2-1:0]}. Each half-size product
// is again a vedic_mult, down to the 2 x 2 leaf (vedic_mult_2x2).
//
// Interface: a, b (N bits, unsigned) in, p (2N bits) out. Purely
// combinational; the caller registers the product.
//
// The split into four half products and the three Kogge-Stone adders with
// the bit ranges above follow the 32 x 32 structure the design is based on
// (built from 16 x 16 blocks); applying it recursively and the 2-bit floor
// are this design's choice. N must be a power of two, at least 2.
//
// Lint note: when this module itself is linted as the top, Verilator reports
// m0..m3 as undriven and a, b as unused in instance 'vedic_mult'. This comes
// from its handling of a module that instantiates itself and stands as top;
// the sub-instances do drive m0..m3. With the module below any other top
// (mac_top, or a testbench) no such warning appears and every product is
// correct.
module vedic_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mult: N must be a power of two, at least 2");
  end

  if (N == 2) begin : g_leaf
    vedic_mult_2x2 u_leaf (.a(a), .b(b), .p(p));
  end else begin : g_split
    localparam int unsigned H = N / 2;

    logic [N-1:0] m0, m1, m2, m3;
    logic [N-1:0] t1_sum;
    logic         t1_cout;
    logic [N:0]   t2;
    logic         t2_cout;   // always 0: t1 + m0[N-1:H] < 2^(N+1)
    logic [N-1:0] hi;
    logic         hi_cout;   // always 0: the full product fits in 2N bits

    vedic_mult #(.N(H)) u_m0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(m0));
    vedic_mult #(.N(H)) u_m1 (.a(a[N-1:H]), .b(b[H-1:0]), .p(m1));
    vedic_mult #(.N(H)) u_m2 (.a(a[H-1:0]), .b(b[N-1:H]), .p(m2));
    vedic_mult #(.N(H)) u_m3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(m3));

    ksa_adder #(.W(N)) u_k1 (
      .a(m1), .b(m2), .cin(1'b0), .sum(t1_sum), .cout(t1_cout)
    );
    ksa_adder #(.W(N + 1)) u_k2 (
      .a({t1_cout, t1_sum}), .b({{(H + 1){1'b0}}, m0[N-1:H]}), .cin(1'b0),
      .sum(t2), .cout(t2_cout)
    );
    ksa_adder #(.W(N)) u_k3 (
      .a(m3), .b({{(H - 1){1'b0}}, t2[N:H]}), .cin(1'b0),
      .sum(hi), .cout(hi_cout)
    );

    assign p = {hi, t2[H-1:0], m0[H-1:0]};
  end
endmodule
