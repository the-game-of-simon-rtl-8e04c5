// sequence_mem_tb: addressed writes and reads of the 64 x 2-bit sequence
// memory against a reference array, including read-disable behaviour.
module sequence_mem_tb;
  logic [5:0] adr;
  logic       readen, writeen;
  logic [1:0] writeval, readval;
  logic [1:0] ref_mem [64];
  int checks = 0, failures = 0;

  sequence_mem dut (.adr(adr), .readen(readen), .writeen(writeen),
                    .writeval(writeval), .readval(readval));

  task automatic write_word(input int a, input logic [1:0] v);
    adr = 6'(a); writeval = v; #1;
    writeen = 1; #1; writeen = 0; #1;
    ref_mem[a] = v;
  endtask

  task automatic read_check(input int a);
    adr = 6'(a); readen = 1; #1;
    checks++;
    if (readval !== ref_mem[a]) begin
      failures++;
      $display("FAIL adr %0d read %0d expected %0d", a, readval, ref_mem[a]);
    end
    readen = 0; #1;
    checks++;
    if (readval !== 2'b00) begin
      failures++;
      $display("FAIL adr %0d read while disabled gives %0d", a, readval);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    readen = 0; writeen = 0; adr = '0; writeval = '0;
    for (int a = 0; a < 64; a++) write_word(a, 2'($urandom));
    for (int a = 0; a < 64; a++) read_check(a);
    for (int i = 0; i < 400; i++) begin
      if ($urandom % 2) write_word(int'($urandom % 64), 2'($urandom));
      else              read_check(int'($urandom % 64));
    end
    for (int a = 63; a >= 0; a--) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
