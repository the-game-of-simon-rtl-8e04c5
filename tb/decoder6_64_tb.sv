// decoder6_64_tb: exhaustive check of the 6-to-64 word-line decoder.
// Every address must raise exactly the word line with that index.
module decoder6_64_tb;
  logic [5:0]  adr;
  logic [63:0] wrdline;
  int checks = 0, failures = 0;

  decoder6_64 dut (.adr(adr), .wrdline(wrdline));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      adr = 6'(a);
      #1;
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (wrdline[i] !== (i == a)) begin
          failures++;
          $display("FAIL adr=%0d line %0d = %b", a, i, wrdline[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
