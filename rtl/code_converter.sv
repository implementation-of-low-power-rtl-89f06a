// code_converter: decodes the 2-bit code of the tri-state detector.
//
// Combinational logic with two inputs and two outputs, as in the document:
// valid is high when TDI carried a driven 0 or 1 and low for Hi-Z, data is
// the driven value. With the code assignment of trc_pkg (0 -> 00, 1 -> 11,
// Hi-Z -> 01) valid is code[1] XNOR code[0] and data is code[1]; the unused
// code 10 is treated as Hi-Z. The truth table is this design's choice.
module code_converter
  import trc_pkg::*;
(
  input  code_t code,
  output logic  data,
  output logic  valid
);
  always_comb begin
    unique case (code)
      CODE_ZERO: begin data = 1'b0; valid = 1'b1; end
      CODE_ONE:  begin data = 1'b1; valid = 1'b1; end
      CODE_HIZ:  begin data = 1'b0; valid = 1'b0; end
      default:   begin data = 1'b0; valid = 1'b0; end
    endcase
  end
endmodule
