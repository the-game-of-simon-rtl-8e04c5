// input_handler_tb: exhaustive check of the button decoder over all 16
// button combinations with the enable high and low.
module input_handler_tb;
  import simon_pkg::*;
  logic    r, g, b, y, en;
  button_t color_out;
  logic [2:0] expected;
  int checks = 0, failures = 0;

  input_handler dut (.r(r), .g(g), .b(b), .y(y), .en(en), .color_out(color_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 16; v++) begin
        {y, g, b, r} = 4'(v);
        en = 1'(e);
        #1;
        if (!en)            expected = 3'b000;
        else if (v == 1)    expected = 3'b100;  // red
        else if (v == 2)    expected = 3'b101;  // blue
        else if (v == 4)    expected = 3'b110;  // green
        else if (v == 8)    expected = 3'b111;  // yellow
        else                expected = 3'b000;  // none or several buttons
        checks++;
        if (color_out !== expected) begin
          failures++;
          $display("FAIL en=%0d ygbr=%b: got %b expected %b", e, v[3:0], color_out, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
