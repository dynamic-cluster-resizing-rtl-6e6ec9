// tb_aiq_mask: exhaustive test of the active-count to enable-mask decode.
module tb_aiq_mask;
  import dcr_pkg::*;

  logic [N_W-1:0] n;
  logic [3:0] en4;
  logic [5:0] en6;
  int checks = 0, failures = 0;

  aiq_mask #(.NC(4)) u4 (.n_active(n), .iq_en(en4));
  aiq_mask #(.NC(6)) u6 (.n_active(n), .iq_en(en6));

  initial begin
    for (int v = 0; v < (1 << N_W); v++) begin
      logic [3:0] e4;
      logic [5:0] e6;
      n = N_W'(v);
      #1;
      for (int c = 0; c < 4; c++) e4[c] = (c == 0) || (c < v);
      for (int c = 0; c < 6; c++) e6[c] = (c == 0) || (c < v);
      checks += 2;
      if (en4 !== e4) begin failures++; $display("FAIL n=%0d en4=%b exp %b", v, en4, e4); end
      if (en6 !== e6) begin failures++; $display("FAIL n=%0d en6=%b exp %b", v, en6, e6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
