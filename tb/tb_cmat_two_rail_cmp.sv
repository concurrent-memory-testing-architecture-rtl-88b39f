// tb_cmat_two_rail_cmp: random test of the two-rail comparator (W = 4).
// With equal inputs the output pair must be a valid two-rail code (its
// rails differ), with unequal inputs an invalid one; single-bit differences
// in every position are included.
module tb_cmat_two_rail_cmp;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b;
  logic [1:0] z;
  int checks = 0, failures = 0;

  cmat_two_rail_cmp #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom);
      b = ($urandom_range(1, 0) == 1) ? a : W'($urandom);
      if (n < 8) b = a ^ W'(1 << (n % W));   // single-bit differences
      #1;
      checks++;
      if ((z[0] != z[1]) != (a == b)) begin
        failures++;
        $display("FAIL a=%h b=%h z=%b", a, b, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
