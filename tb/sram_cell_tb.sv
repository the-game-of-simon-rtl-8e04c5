// sram_cell_tb: checks write, hold and gated read of one SRAM bit.
module sram_cell_tb;
  logic write, read, din, dout;
  logic expect_bit;
  int checks = 0, failures = 0;

  sram_cell dut (.write(write), .read(read), .din(din), .dout(dout));

  task automatic check(input logic exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: dout=%b expected %b", what, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write = 0; read = 0; din = 0;
    expect_bit = 0;
    write = 1; din = 0; #1; write = 0; #1;
    for (int i = 0; i < 200; i++) begin
      din = 1'($urandom);
      write = 1'($urandom);
      #1;
      if (write) expect_bit = din;
      write = 0;
      din = ~din;          // data changing while write is low must not matter
      #1;
      read = 0; #1; check(1'b0, "read disabled");
      read = 1; #1; check(expect_bit, "read");
      read = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
