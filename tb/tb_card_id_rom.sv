// tb_card_id_rom: reads all 16 words and compares them with the ASCII codes
// of "VMEIDIUCFTDC10" (one character per word, low byte) followed by zeros.
module tb_card_id_rom;
  logic [3:0]  word_addr;
  logic [15:0] data;
  int unsigned checks = 0, failures = 0;
  byte unsigned expect_chr [16] = '{8'h56, 8'h4D, 8'h45, 8'h49, 8'h44, 8'h49, 8'h55, 8'h43,
                                    8'h46, 8'h54, 8'h44, 8'h43, 8'h31, 8'h30, 8'h00, 8'h00};

  card_id_rom dut (.word_addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      word_addr = 4'(i);
      #10;
      checks++;
      if (data !== {8'h00, expect_chr[i]}) begin
        failures++;
        $display("ERROR word %0d: got %h expected %h", i, data, {8'h00, expect_chr[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
