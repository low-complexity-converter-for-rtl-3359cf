// tb_converter_sizes: end-to-end check of the reverse converter at
// n = 11, 22 and 43, the sizes (32-, 64- and 128-bit dynamic range) of the
// published FPGA comparison besides the default n = 86. Each size gets
// corner values and random numbers from the dynamic range, forward-converted
// by plain remainders and compared after reverse conversion. Every datapath
// mechanism must occur at each size. A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_converter_sizes;

  localparam int NH = 3;

  logic start;
  logic [NH-1:0] done;
  int chk [NH], fl [NH], nc [NH], nx [NH], nz [NH], nb [NH], nf [NH];
  int checks = 0, failures = 0;

  tb_rc_harness #(.N(11), .FIX_ZERO(1'b1), .EXHAUSTIVE(1'b0), .COUNT(20000)) h0 (start, done[0], chk[0], fl[0], nc[0], nx[0], nz[0], nb[0], nf[0]);
  tb_rc_harness #(.N(22), .FIX_ZERO(1'b1), .EXHAUSTIVE(1'b0), .COUNT(5000))  h1 (start, done[1], chk[1], fl[1], nc[1], nx[1], nz[1], nb[1], nf[1]);
  tb_rc_harness #(.N(43), .FIX_ZERO(1'b1), .EXHAUSTIVE(1'b0), .COUNT(5000))  h2 (start, done[2], chk[2], fl[2], nc[2], nx[2], nz[2], nb[2], nf[2]);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    #1;
    start = 1'b1;
    wait (&done);
    for (int i = 0; i < NH; i++) begin
      checks += chk[i];
      failures += fl[i];
      $display("size %0d: checks=%0d failures=%0d cout=%0d x1=2^n:%0d second-zero=%0d carry-into-n=%0d",
               i, chk[i], fl[i], nc[i], nx[i], nz[i], nb[i]);
      checks++;
      if (nc[i] == 0 || nx[i] == 0 || nz[i] == 0 || nb[i] == 0) begin
        failures++;
        $display("FAIL size %0d: a mechanism never occurred", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
