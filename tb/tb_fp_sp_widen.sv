// tb_fp_sp_widen: self-checking testbench of the binary32 to binary64
// conversion. Every denormal leading-one position, both signed zeros,
// infinities, NaNs and random normal and denormal words are converted. The
// binary64 result is compared with the value of the binary32 word worked out
// with real arithmetic (fraction times a power of two). NaNs must stay NaNs
// with the same quiet bit. The block is combinational; the testbench steps
// through vectors one time unit apart, and a watchdog ends the run.
`timescale 1ns/1ps
module tb_fp_sp_widen;
  import fpmac_pkg::*;
  import tb_fp_pkg::*;

  logic [31:0] s;
  fp64_t       d;
  int checks = 0, failures = 0;
  int n_denorm = 0;

  fp_sp_widen dut (.s(s), .d(d));

  task automatic check(input logic [31:0] v);
    s = v;
    #1;
    checks++;
    if (v[30:23] == 8'hFF && v[22:0] != 0) begin
      if (!(d.exp == 11'h7FF && d.frac != 0 && d.frac[51] == v[22] && d.sign == v[31])) begin
        failures++;
        $display("FAIL nan %h -> %h", v, d);
      end
    end else if (v[30:23] == 8'hFF) begin
      if (d !== {v[31], 11'h7FF, 52'd0}) begin
        failures++;
        $display("FAIL inf %h -> %h", v, d);
      end
    end else begin
      if ($bitstoreal(d) != sp_value(v) || d.sign != v[31]) begin
        failures++;
        $display("FAIL %h -> %h (%g, want %g)", v, d, $bitstoreal(d), sp_value(v));
      end
      if (v[30:23] == 0 && v[22:0] != 0) n_denorm++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_0000);
    check(32'h8000_0000);
    check(32'h7F80_0000);
    check(32'hFF80_0000);
    check(32'h7FC0_0000);
    check(32'h7FA0_0000);
    check(32'h0000_0001);
    check(32'h7F7F_FFFF);
    check(32'h0080_0000);
    for (int i = 0; i < 23; i++) begin
      check(32'h1 << i);
      check((32'h1 << i) | ($urandom & ((32'h1 << i) - 1)) | 32'h8000_0000);
    end
    for (int i = 0; i < 3000; i++) begin
      automatic logic [31:0] v = $urandom;
      if (i % 4 == 0) v[30:23] = 8'h00;
      check(v);
    end
    if (n_denorm == 0) begin failures++; $display("FAIL no denormals"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
