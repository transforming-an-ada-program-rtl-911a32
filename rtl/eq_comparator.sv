// eq_comparator: equality comparator of the RIP chip.
//
// A bank of exclusive-NOR gates, one per bit pair, whose outputs are ANDed:
// eq is high when a equals b. It is purely combinational. The chip uses it
// between INITNUM.CTR and INITNUM.REG, between each TOS counter and its
// register, and (with b tied to all ones) as the "= 111" detector on
// REG.CTR. The XNOR-bank structure is the one the chip used.
module eq_comparator #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);

  logic [W-1:0] bit_eq;

  always_comb begin
    for (int i = 0; i < W; i++) bit_eq[i] = ~(a[i] ^ b[i]);
    eq = &bit_eq;
  end

endmodule
