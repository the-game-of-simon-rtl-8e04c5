// sram_64x2_nodec_tb: fills the 64 x 2 array through one-hot word lines,
// rewrites random words and reads all back against a reference array.
module sram_64x2_nodec_tb;
  logic [63:0] wrdline;
  logic        readen, writeen;
  logic [1:0]  writeval, readval;
  logic [1:0]  ref_mem [64];
  int checks = 0, failures = 0;

  sram_64x2_nodec dut (.wrdline(wrdline), .readen(readen), .writeen(writeen),
                       .writeval(writeval), .readval(readval));

  task automatic write_word(input int a, input logic [1:0] v);
    wrdline = 64'd1 << a; writeval = v; #1;
    writeen = 1; #1; writeen = 0; #1;
    ref_mem[a] = v;
  endtask

  task automatic read_check(input int a);
    wrdline = 64'd1 << a; readen = 1; #1;
    checks++;
    if (readval !== ref_mem[a]) begin
      failures++;
      $display("FAIL word %0d read %0d expected %0d", a, readval, ref_mem[a]);
    end
    readen = 0; #1;
    checks++;
    if (readval !== 2'b00) begin
      failures++;
      $display("FAIL word %0d read while disabled gives %0d", a, readval);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    readen = 0; writeen = 0; wrdline = '0; writeval = '0;
    for (int a = 0; a < 64; a++) write_word(a, 2'((a * 7 + 3) % 4));
    for (int a = 0; a < 64; a++) read_check(a);
    for (int i = 0; i < 300; i++) begin
      if ($urandom % 2) write_word(int'($urandom % 64), 2'($urandom));
      else              read_check(int'($urandom % 64));
    end
    for (int a = 0; a < 64; a++) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
