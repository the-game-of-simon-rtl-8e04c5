// flopenr_tb: random enable/reset/data against a reference register; q must
// update only when ph1 rises, reset must win over enable.
module flopenr_tb;
  localparam int W = 8;
  logic         ph1 = 0, ph2 = 0, reset, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  flopenr #(.WIDTH(W)) dut (.ph1(ph1), .ph2(ph2), .reset(reset), .en(en), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 0; d = '0;
    #1 ph2 = 1; #4 ph2 = 0; #1 ph1 = 1; #4 ph1 = 0;
    model = '0;
    for (int i = 0; i < 500; i++) begin
      reset = ($urandom % 8) == 0;
      en    = 1'($urandom);
      d     = W'($urandom);
      #1 ph2 = 1; #4 ph2 = 0;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL q changed before ph1");
      end
      d = ~d;                      // changes after ph2 must not be captured
      #1 ph1 = 1; #4 ph1 = 0;
      if (reset)   model = '0;
      else if (en) model = ~d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d: q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
