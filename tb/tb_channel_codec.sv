// tb_channel_codec: every 16-bit word is encoded and compared with a
// reference Hamming(7,4) code; it is decoded clean, then with one bit
// flipped in a random subset of its nibbles, and must come back unchanged
// with corrected set exactly when a bit was flipped.
module tb_channel_codec;
  import mrpma_pkg::*;
  import tb_ref_pkg::*;
  logic [15:0] enc_data, dec_data;
  logic [27:0] enc_code, dec_code;
  logic corrected;
  int checks = 0, failures = 0;

  channel_codec dut (.*);

  initial begin
    #1000000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w < 65536; w++) begin
      logic [27:0] flip;
      enc_data = 16'(w);
      #1;
      checks++;
      if (enc_code !== ham_word(16'(w))) begin failures++; $display("enc %h: %h exp %h", w, enc_code, ham_word(16'(w))); end
      dec_code = enc_code;
      #1;
      checks++;
      if (dec_data !== 16'(w) || corrected) begin failures++; $display("clean dec %h", w); end
      flip = '0;
      for (int j = 0; j < 4; j++) if ($urandom % 2) flip[7*j + ($urandom % 7)] = 1'b1;
      if (flip == '0) flip[$urandom % 28] = 1'b1;
      dec_code = enc_code ^ flip;
      #1;
      checks++;
      if (dec_data !== 16'(w) || !corrected) begin failures++; $display("dec %h flip %h -> %h", w, flip, dec_data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
