// tb_umass_alu: exhaustive check of the UMASScore ALU.
//
// Runs every operation code over all values of A, a spread of B values
// (all eight bit-select codes included) and both carry-in values, and compares
// result, carry out and zero out with a reference computed here in plain
// integer arithmetic.
module tb_umass_alu;
  logic [3:0] op;
  logic [7:0] a, b, y;
  logic       cin, cout, zout;
  int checks = 0, failures = 0;

  umass_alu dut (.*);

  initial begin
    int ey, ec, ez, m;
    for (int o = 0; o < 16; o++)
      for (int ai = 0; ai < 256; ai++)
        for (int bi = 0; bi < 256; bi += 7)
          for (int ci = 0; ci < 2; ci++) begin
            op = 4'(o); a = 8'(ai); b = 8'(bi); cin = 1'(ci);
            #1;
            m  = 1 << (bi / 32);
            ec = 0;
            case (o)
              0:  begin ey = (ai + bi) % 256; ec = (ai + bi) > 255; end
              1:  begin ey = (ai - bi + 256) % 256; ec = ai >= bi; end
              2:  ey = ai & bi;
              3:  ey = ai | bi;
              4:  ey = ai ^ bi;
              5:  ey = 255 - ai;
              6:  begin ey = ci * 128 + ai / 2; ec = ai % 2; end
              7:  begin ey = (ai * 2) % 256 + ci; ec = ai / 128; end
              8:  ey = (ai % 16) * 16 + ai / 16;
              9:  ey = ai & (255 - m);
              10: ey = ai | m;
              default: ey = ai;
            endcase
            if (o == 11)      ez = (ai & m) == 0;
            else if (o == 12) ez = (ai & m) != 0;
            else              ez = (ey == 0);
            checks++;
            if (y != 8'(ey) || zout != 1'(ez) ||
                ((o == 0 || o == 1 || o == 6 || o == 7) && cout != 1'(ec))) begin
              failures++;
              if (failures < 10)
                $display("FAIL op=%0d a=%02h b=%02h cin=%0d: y=%02h c=%0d z=%0d, expected %02h %0d %0d",
                         o, ai, bi, ci, y, cout, zout, ey, ec, ez);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
