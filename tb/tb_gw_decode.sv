// tb_gw_decode: checks the instruction decoder.
//
// Random instruction words of every opcode are decoded and each field, the
// scalar flag and the read/write/branch/exit flags are compared with a table
// written out independently here.
module tb_gw_decode;
  import gw_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] instr;
  dinst_t      dinst;
  logic        scalar;

  gw_decode dut (.instr, .dinst, .scalar);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0b expected %0b for %h", what, got, exp, instr);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int unsigned o;
      bit ewr, er1, er2, ebr, eex;
      instr = $urandom;
      o = instr[30:27];
      // expected flags: op 1..7 write and read both, 8 reads one, 9..12 write
      // only, 13/14 branch reading src1, 15 exit
      ewr = (o >= 1 && o <= 12);
      er1 = (o >= 1 && o <= 8) || o == 13 || o == 14;
      er2 = (o >= 1 && o <= 7);
      ebr = (o == 13 || o == 14);
      eex = (o == 15);
      #1;
      checks++;
      if (dinst.op !== opcode_e'(o) || dinst.dst !== instr[26:22] || dinst.src1 !== instr[21:17] ||
          dinst.src2 !== instr[16:12] || dinst.imm !== instr[11:0]) begin
        failures++;
        $display("FAIL: fields of %h", instr);
      end
      expect_bit("scalar", scalar, instr[31]);
      expect_bit("wr", dinst.wr, ewr);
      expect_bit("rd1", dinst.rd1, er1);
      expect_bit("rd2", dinst.rd2, er2);
      expect_bit("branch", dinst.branch, ebr);
      expect_bit("exit", dinst.ex, eex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
