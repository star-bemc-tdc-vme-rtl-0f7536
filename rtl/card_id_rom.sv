// card_id_rom: identification string of the TDC Output Card.
//
// The 16 words at B+0..B+1E read the ASCII text "VMEIDIUCFTDC10", one
// character per word in the odd (low) byte with the even byte 0; the two
// words after the 14 characters read 0. The text and its place follow the
// card documentation; the zero even bytes and padding are this design's
// reading of it. Purely combinational: data follows word_addr.
module card_id_rom (
  input  logic [3:0]  word_addr,
  output logic [15:0] data
);

  localparam int unsigned        ID_LEN  = 14;
  localparam logic [8*ID_LEN-1:0] ID_TEXT = "VMEIDIUCFTDC10";  // first character in the top byte

  function automatic logic [7:0] id_char(input int unsigned i);
    if (i < ID_LEN) return ID_TEXT[8*(ID_LEN-1-i) +: 8];
    else            return 8'h00;
  endfunction

  always_comb begin
    data = '0;
    for (int unsigned i = 0; i < 16; i++)
      if (word_addr == 4'(i)) data = {8'h00, id_char(i)};
  end

endmodule
