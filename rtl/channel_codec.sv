// channel_codec: channel encoder and decoder of the fourth-column processing
// elements. A switch that sends encodes each 16-bit data word; a switch that
// receives decodes it. The code is Hamming(7,4) applied to each of the four
// nibbles, giving a 28-bit codeword; nibble j occupies code bits 7j+6..7j in
// the order p1 p2 d1 p4 d2 d3 d4 (bit 7j = position 1). The decoder computes
// the 3-bit syndrome of each nibble, flips the bit it points to, and so
// corrects one bit error per nibble; corrected reports that it did.
// Both paths are combinational. That the fourth column encodes at the source
// and decodes at the destination follows the document; the choice of code is
// this design's, as the document does not name one.
module channel_codec
  import mrpma_pkg::*;
(
  input  logic [DATA_W-1:0] enc_data,
  output logic [27:0]       enc_code,
  input  logic [27:0]       dec_code,
  output logic [DATA_W-1:0] dec_data,
  output logic              corrected
);
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic [3:0] d;
      d = enc_data[4*j +: 4];
      enc_code[7*j + 0] = d[0] ^ d[1] ^ d[3];   // p1
      enc_code[7*j + 1] = d[0] ^ d[2] ^ d[3];   // p2
      enc_code[7*j + 2] = d[0];
      enc_code[7*j + 3] = d[1] ^ d[2] ^ d[3];   // p4
      enc_code[7*j + 4] = d[1];
      enc_code[7*j + 5] = d[2];
      enc_code[7*j + 6] = d[3];
    end
  end

  always_comb begin
    corrected = 1'b0;
    for (int j = 0; j < 4; j++) begin
      logic [6:0] c;
      logic [2:0] s;
      c = dec_code[7*j +: 7];
      s[0] = c[0] ^ c[2] ^ c[4] ^ c[6];
      s[1] = c[1] ^ c[2] ^ c[5] ^ c[6];
      s[2] = c[3] ^ c[4] ^ c[5] ^ c[6];
      if (s != 3'd0) begin
        c[s - 3'd1] = ~c[s - 3'd1];
        corrected   = 1'b1;
      end
      dec_data[4*j +: 4] = {c[6], c[5], c[4], c[2]};
    end
  end
endmodule
