// tb_cc_z_out_of: checks the multiplicity flag: strictly more than Z
// active coordinates, counted over 16 coordinates with NP = 1 and over
// the first 8 with NP = 0. All Z values and random activity levels.
module tb_cc_z_out_of;
  logic [15:0] in;
  logic np;
  logic [3:0] z;
  logic zflag;
  int checks = 0, failures = 0;

  cc_z_out_of dut (.in, .np, .z, .zflag);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int zz = 0; zz < 16; zz++) begin
        np = 1'(m); z = 4'(zz);
        repeat (40) begin
          int n, lim;
          in = 16'($urandom);
          if ($urandom_range(0, 1) != 0) in |= 16'($urandom);
          if ($urandom_range(0, 3) == 0) in = 16'hFFFF;
          #1;
          n = 0;
          lim = np ? 16 : 8;
          for (int k = 0; k < lim; k++) n += in[k];
          checks++;
          if (zflag !== (n > zz)) begin
            failures++;
            $display("np=%0d z=%0d in=%h n=%0d flag=%0d", np, zz, in, n, zflag);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
