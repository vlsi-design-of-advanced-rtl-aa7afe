// tb_aes_sbox: exhaustive check of the merged S-box in both directions against the
// generator-walk S-box table of the reference model.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  logic inv;
  int checks = 0, failures = 0;
  logic [7:0] sb [256];
  logic [7:0] isb [256];

  aes_sbox dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_tables(sb, isb);
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < 256; i++) begin
        inv = d[0]; din = i[7:0];
        #1;
        checks++;
        if (dout !== (d ? isb[i] : sb[i])) begin
          failures++;
          $display("FAIL inv=%0d in=%h out=%h", d, din, dout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
