// tb_cc_and_or2: checks the four And/Or 2 functions of LO against the
// chip's table, for both values of the multiplicity flag.
module tb_cc_and_or2;
  import cc_pkg::*;
  logic [15:0] in, out;
  logic zflag;
  lo_e lo;
  int checks = 0, failures = 0;

  cc_and_or2 dut (.in, .zflag, .lo, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 4; l++)
      for (int zf = 0; zf < 2; zf++) begin
        lo = lo_e'(l); zflag = 1'(zf);
        repeat (20) begin
          in = 16'($urandom);
          #1;
          for (int k = 0; k < 16; k++) begin
            logic e;
            case (l)
              0: e = in[k] && !zflag;
              1: e = in[k] && zflag;
              2: e = !(in[k] && !zflag);
              default: e = !(in[k] && zflag);
            endcase
            checks++;
            if (out[k] !== e) begin
              failures++;
              $display("lo=%0d z=%0d k=%0d in=%b out=%b", l, zf, k, in[k], out[k]);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
