// tb_pipebsw_top: end-to-end testbench of the aligner. Runs two complete
// instances side by side, each driven and checked by pipebsw_e2e:
//   - the default configuration: 6 segments per read (156 bases), 3 PEs,
//     M = 27, threshold 10, 14 reads;
//   - reads of 8 segments (204 bases, enough for a 200-base read), 14 reads.
// The sum of their checks and failures is the result.
module tb_pipebsw_top;
  int  c_std, f_std, c_long, f_long;
  bit  d_std, d_long;

  pipebsw_e2e #(.NS(6), .NREAD(14)) u_std  (.checks(c_std),  .failures(f_std),  .finished(d_std));
  pipebsw_e2e #(.NS(8), .NREAD(14)) u_long (.checks(c_long), .failures(f_long), .finished(d_long));

  initial begin
    fork
      begin
        #400us;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c_std + c_long, f_std + f_long + 1);
        $finish;
      end
      begin
        wait (d_std && d_long);
        $display("TB_RESULT checks=%0d failures=%0d", c_std + c_long, f_std + f_long);
        $finish;
      end
    join_any
  end
endmodule
