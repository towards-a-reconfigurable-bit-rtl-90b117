// bus_logic: bus logic and XOR/XNOR logic of one compute-logic column.
//
// Inputs are the column's latched sense outputs: sa_and (AND of the rows
// read) and sa_nor (their NOR). Their complements give NAND and OR. XNOR is
// the NAND of (NAND, OR), i.e. AND | NOR, and an inverter gives XOR. The
// distributed column bus carries one of AND, NAND, OR, NOR, XOR, XNOR, the
// sum from the column's ADD logic, or data_in, chosen by src. The XOR value
// is also the propagate signal of the column's adder. Combinational.
//
// Shared unchanged by the bit-serial and the bit-parallel compute logic, as
// in the document. The bus being a one-hot pass-transistor mux is modelled
// as a case statement; sources with no bus meaning (SRC_MASK_IN) drive 0.
module bus_logic
  import vram_pkg::*;
(
  input  src_e src,
  input  logic sa_and,
  input  logic sa_nor,
  input  logic sum,
  input  logic din,
  output logic xor_v,
  output logic bus
);

  logic nand_v, or_v, xnor_v;

  always_comb begin
    nand_v = ~sa_and;
    or_v   = ~sa_nor;
    xnor_v = ~(nand_v & or_v);
    xor_v  = ~xnor_v;
    unique case (src)
      SRC_AND:  bus = sa_and;
      SRC_NAND: bus = nand_v;
      SRC_OR:   bus = or_v;
      SRC_NOR:  bus = sa_nor;
      SRC_XOR:  bus = xor_v;
      SRC_XNOR: bus = xnor_v;
      SRC_ADD:  bus = sum;
      SRC_DIN:  bus = din;
      default:  bus = 1'b0;
    endcase
  end

endmodule
