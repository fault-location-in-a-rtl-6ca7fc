// Testbench for rm_encoder and rm_decoder, W = 8 (Reed-Muller (8,4)).
// Checks the code words and decodings of the chip-select example (stored
// 0000, 0001, 0010, 0011; retrieved 11111111 -> 1000, 00010101 -> 0001,
// 00110111 -> 0010), every code word against the generator rows written out
// here, and that every single-bit error is corrected.
module rm_codec_tb;
  localparam int unsigned W = 8;
  logic [3:0] info, dinfo;
  logic [W-1:0] code, rx;
  int checks = 0, failures = 0;

  rm_encoder #(.W(W)) enc (.info(info), .code(code));
  rm_decoder #(.W(W)) dec (.code(rx), .info(dinfo));

  localparam logic [7:0] G [4] = '{8'b01010101, 8'b00110011, 8'b00001111, 8'b11111111};

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example values
    info = 4'b0000; #1 chk(32'(code), 32'(8'b00000000), "enc 0000");
    info = 4'b0001; #1 chk(32'(code), 32'(8'b01010101), "enc 0001");
    info = 4'b0010; #1 chk(32'(code), 32'(8'b00110011), "enc 0010");
    info = 4'b0011; #1 chk(32'(code), 32'(8'b01100110), "enc 0011");
    rx = 8'b11111111; #1 chk(32'(dinfo), 32'(4'b1000), "dec 11111111");
    rx = 8'b00010101; #1 chk(32'(dinfo), 32'(4'b0001), "dec 00010101");
    rx = 8'b00110111; #1 chk(32'(dinfo), 32'(4'b0010), "dec 00110111");
    // All code words, all single errors
    for (int k = 0; k < 16; k++) begin
      logic [7:0] exp;
      exp = '0;
      for (int r = 0; r < 4; r++) if (k[r]) exp ^= G[r];
      info = 4'(k);
      #1 chk(32'(code), 32'(exp), "enc all");
      rx = code;
      #1 chk(32'(dinfo), 32'(k), "dec clean");
      for (int b = 0; b < W; b++) begin
        rx = code ^ (8'(1) << b);
        #1 chk(32'(dinfo), 32'(k), "dec 1 error");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
