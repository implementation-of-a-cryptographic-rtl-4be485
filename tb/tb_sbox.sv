// tb_sbox: exhaustive check of the S-box against a table built by the
// generator walk in tb_ref_pkg, plus two FIPS-197 entries.
module tb_sbox;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, y;
  sbox dut (.in_byte(a), .out_byte(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (y !== ref_sbox(a)) begin
        failures++;
        $display("sbox(%02x) = %02x, expected %02x", a, y, ref_sbox(a));
      end
    end
    a = 8'h00; #1; checks++; if (y !== 8'h63) failures++;
    a = 8'h53; #1; checks++; if (y !== 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
