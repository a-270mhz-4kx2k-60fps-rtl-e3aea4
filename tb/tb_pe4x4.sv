// tb_pe4x4: random and corner vectors for the 4x4 SAD element, checked against a plain sum.
module tb_pe4x4;
  import ime_pkg::*;
  pix_t  cur [16];
  pix_t  rp  [16];
  sad4_t sad;
  int checks = 0, failures = 0;

  pe4x4 dut (.cur(cur), .ref_px(rp), .sad(sad));

  initial begin
    for (int t = 0; t < 300; t++) begin
      int exp_sad;
      exp_sad = 0;
      for (int i = 0; i < 16; i++) begin
        case (t)
          0: begin cur[i] = 8'd255; rp[i] = 8'd0; end
          1: begin cur[i] = 8'd0;   rp[i] = 8'd255; end
          2: begin cur[i] = 8'(i * 9); rp[i] = 8'(i * 9); end
          default: begin cur[i] = 8'($urandom); rp[i] = 8'($urandom); end
        endcase
        exp_sad += (int'(cur[i]) > int'(rp[i])) ? int'(cur[i]) - int'(rp[i]) : int'(rp[i]) - int'(cur[i]);
      end
      #1;
      checks++;
      if (int'(sad) != exp_sad) begin
        failures++;
        $display("mismatch t=%0d got %0d exp %0d", t, sad, exp_sad);
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
