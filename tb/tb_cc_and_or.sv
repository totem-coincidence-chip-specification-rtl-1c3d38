// tb_cc_and_or: checks the four And/Or functions (AO = 00 and, 01 or,
// 10 V only, 11 W only) on random V and W coincidence vectors.
module tb_cc_and_or;
  import cc_pkg::*;
  logic [15:0] v, w, out, exp;
  ao_e ao;
  int checks = 0, failures = 0;

  cc_and_or dut (.v_coinc (v), .w_coinc (w), .ao, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++) begin
      ao = ao_e'(a);
      repeat (50) begin
        v = 16'($urandom); w = 16'($urandom);
        #1;
        for (int k = 0; k < 16; k++) begin
          case (a)
            0: exp[k] = v[k] && w[k];
            1: exp[k] = v[k] || w[k];
            2: exp[k] = v[k];
            default: exp[k] = w[k];
          endcase
        end
        checks++;
        if (out !== exp) begin
          failures++;
          $display("ao=%0d v=%h w=%h out=%h exp=%h", a, v, w, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
