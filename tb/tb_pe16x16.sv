// tb_pe16x16: random 16x16 blocks; each of the 16 4x4 SADs is checked against a plain sum
// over the corresponding pixel rectangle.
module tb_pe16x16;
  import ime_pkg::*;
  pix_t  cur [256];
  pix_t  rp  [256];
  sad4_t sad4 [16];
  int checks = 0, failures = 0;

  pe16x16 dut (.cur(cur), .ref_px(rp), .sad4(sad4));

  initial begin
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < 256; i++) begin
        cur[i] = 8'($urandom);
        rp[i]  = (t == 0) ? 8'(255 - cur[i]) : 8'($urandom);
      end
      #1;
      for (int by = 0; by < 4; by++) begin
        for (int bx = 0; bx < 4; bx++) begin
          int e;
          e = 0;
          for (int y = by * 4; y < by * 4 + 4; y++)
            for (int x = bx * 4; x < bx * 4 + 4; x++) begin
              int d;
              d = int'(cur[y*16+x]) - int'(rp[y*16+x]);
              e += (d < 0) ? -d : d;
            end
          checks++;
          if (int'(sad4[by*4+bx]) != e) begin
            failures++;
            $display("mismatch t=%0d blk %0d,%0d got %0d exp %0d", t, bx, by, sad4[by*4+bx], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
