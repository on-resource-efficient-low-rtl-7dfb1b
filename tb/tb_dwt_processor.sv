// Testbench of dwt_processor: the checking bench (dwt_proc_bench) runs at
// the default 4 MACs (q = 4) and at 3 MACs (q = 6, the size of the worked
// scheduling example), each on 256 samples over three octaves.
module tb_dwt_processor;
  bit  done4, done3;
  int  c4, f4, c3, f3;
  dwt_proc_bench #(.R(4)) u_r4 (.done(done4), .checks(c4), .failures(f4));
  dwt_proc_bench #(.R(3)) u_r3 (.done(done3), .checks(c3), .failures(f3));
  initial begin
    wait (done4 && done3);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c3, f4 + f3);
    $finish;
  end
  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c3, f4 + f3 + 1);
    $finish;
  end
endmodule
