// Self-check of the Post-CLA logic block against its output table: the seven
// rows (R, R.C, R+C, R xor C and the inverted AND, OR, XOR) written out as
// control bit patterns FADD FAND FOR FXOR FINV, on random R and C.
module tb_post_cla_logic;
  import icalu_pkg::*;
  logic [31:0] r, c, p;
  logic_ctl_t  ctl;
  int checks = 0, failures = 0;

  post_cla_logic dut (.r(r), .c(c), .ctl(ctl), .p(p));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [4:0]  rows [7] = '{5'b10000, 5'b01000, 5'b00100, 5'b00010, 5'b01001, 5'b00101, 5'b00011};
    logic [31:0] exp;
    for (int n = 0; n < 3000; n++) begin
      r = $urandom; c = $urandom;
      foreach (rows[i]) begin
        ctl = logic_ctl_t'(rows[i]); #1;
        unique case (i)
          0: exp = r;
          1: exp = r & c;
          2: exp = r | c;
          3: exp = r ^ c;
          4: exp = ~(r & c);
          5: exp = ~(r | c);
          default: exp = ~(r ^ c);
        endcase
        checks++;
        if (p !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL row=%0d r=%h c=%h p=%h exp=%h", i, r, c, p, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
