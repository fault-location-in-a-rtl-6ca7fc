// Testbench for line_decoder: every input value with the enable high and
// low, against a one-hot value computed by shifting.
module line_decoder_tb;
  localparam int unsigned IN_W = 6;
  localparam int unsigned OUT_N = 64;
  logic [IN_W-1:0] in_val;
  logic en;
  logic [OUT_N-1:0] sel;
  int checks = 0, failures = 0;

  line_decoder #(.IN_W(IN_W), .OUT_N(OUT_N)) dut (.in_val(in_val), .en(en), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < (1 << IN_W); v++) begin
        in_val = IN_W'(v);
        en = e[0];
        #1;
        checks++;
        if (sel !== (e[0] ? (OUT_N'(1) << v) : '0)) begin
          failures++;
          $display("FAIL en=%0d in=%0d sel=%h", e, v, sel);
        end
        if (e[0]) begin
          checks++;
          if ($countones(sel) != 1) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
