// ssaspl_latch: one static differential sense-amplifier shared pulsed latch
// (SSASPL), the storage cell of the shift register.
//
// The cell is a cross-coupled inverter pair (Q/Qb) with two input NMOS
// transistors driven by the complementary data D/Db and one shared clock
// transistor driven by the pulsed clock. While the pulse is high the side
// whose data input is high is pulled to ground, so the pair takes the value
// of D; while the pulse is low the pair holds. That behaviour follows the
// transistor-level cell; as digital logic it is modelled here as a storage
// bit that loads D during a pulse slot of the system clock.
//
// Interface: clk is the system clock that defines one pulse slot; pulse is
// the pulsed clock, high for exactly one clk cycle; d/db are the
// complementary inputs; q/qb the complementary outputs.
// Timing: q changes at the clk edge that ends the pulse slot. If d and db
// are equal (no differential input) the cell keeps its state; that case is
// not defined by the transistor cell and holding is this model's choice.
// The cell has no reset, like the transistor cell.
module ssaspl_latch (
  input  logic clk,
  input  logic pulse,
  input  logic d,
  input  logic db,
  output logic q,
  output logic qb
);
  logic state;

  always_ff @(posedge clk) begin
    if (pulse && (d != db)) state <= d;
  end

  assign q  = state;
  assign qb = ~state;
endmodule
