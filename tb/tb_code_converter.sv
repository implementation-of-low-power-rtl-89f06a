// tb_code_converter: exhaustive check of the four codes: 00 is a driven 0,
// 11 a driven 1, 01 (Hi-Z) and 10 are not valid data.
module tb_code_converter;
  import trc_pkg::*;
  code_t code;
  logic  data, valid;
  int checks = 0, failures = 0;
  logic exp_data [4] = '{1'b0, 1'b0, 1'b0, 1'b1};
  logic exp_valid[4] = '{1'b1, 1'b0, 1'b0, 1'b1};

  code_converter dut (.code(code), .data(data), .valid(valid));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int c = 0; c < 4; c++) begin
        code = code_t'(c);
        #1;
        checks++;
        if (valid !== exp_valid[c] || (valid && data !== exp_data[c])) begin
          failures++;
          $display("code %b: data=%b valid=%b", code, data, valid);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
