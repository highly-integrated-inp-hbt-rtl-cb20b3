// tb_sync_compare: applies all 1024 ten-bit words with and without word_valid and checks
// that sync is raised exactly for the four frame sync codes: K28.5 (0FA, 305) and K28.7
// (0F8, 307), written with bit 'a' in bit 9.
module tb_sync_compare;
  logic [9:0] word;
  logic word_valid, sync, comma_k28_7;
  int checks = 0, failures = 0;
  int hits = 0;

  sync_compare dut (.word, .word_valid, .sync, .comma_k28_7);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want, want7;
    for (int v = 0; v < 2; v++)
      for (int w = 0; w < 1024; w++) begin
        word = 10'(w);
        word_valid = v[0];
        #1;
        want7 = (w == 'h0F8) || (w == 'h307);
        want  = v[0] && ((w == 'h0FA) || (w == 'h305) || want7);
        checks++;
        if (sync !== want) begin
          failures++;
          $display("word %h valid %0d: sync %b", w, v, sync);
        end
        if (want) begin
          hits++;
          checks++;
          if (comma_k28_7 !== want7) failures++;
        end
      end
    checks++;
    if (hits != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
