// tb_sad_merge: random 4x4 SADs; the merged SAD of every PU shape and position is checked
// against a sum over the PU's rectangle, with the rectangles written out independently here.
module tb_sad_merge;
  import ime_pkg::*;
  sad4_t      sad4 [16];
  pu_shape_e  shape;
  logic [1:0] sub8;
  logic       part;
  sad_t       sad;
  int checks = 0, failures = 0;

  sad_merge dut (.sad4(sad4), .shape(shape), .sub8(sub8), .part(part), .sad(sad));

  function automatic int expect_sum(int s, int sb, int pt);
    int x0, y0, w, h, e;
    x0 = 0; y0 = 0; w = 16; h = 16;
    case (s)
      1: begin y0 = pt * 8; h = 8; end
      2: begin x0 = pt * 8; w = 8; end
      3: begin x0 = (sb % 2) * 8; y0 = (sb / 2) * 8; w = 8; h = 8; end
      4: begin x0 = (sb % 2) * 8; y0 = (sb / 2) * 8 + pt * 4; w = 8; h = 4; end
      5: begin x0 = (sb % 2) * 8 + pt * 4; y0 = (sb / 2) * 8; w = 4; h = 8; end
      default: ;
    endcase
    e = 0;
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++)
        if (bx * 4 >= x0 && bx * 4 < x0 + w && by * 4 >= y0 && by * 4 < y0 + h) e += int'(sad4[by*4+bx]);
    return e;
  endfunction

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int b = 0; b < 16; b++) sad4[b] = (t == 0) ? 12'd4080 : 12'($urandom_range(0, 4080));
      for (int s = 0; s < 8; s++)
        for (int sb = 0; sb < 4; sb++)
          for (int pt = 0; pt < 2; pt++) begin
            shape = pu_shape_e'(s);
            sub8  = 2'(sb);
            part  = 1'(pt);
            #1;
            checks++;
            if (int'(sad) != expect_sum(s, sb, pt)) begin
              failures++;
              $display("mismatch shape %0d sub8 %0d part %0d got %0d exp %0d", s, sb, pt, sad, expect_sum(s, sb, pt));
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
