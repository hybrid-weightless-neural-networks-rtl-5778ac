// tb_thermo_enc: exhaustive and random test of the thermometer encoder.
//
// For 3-bit activations every value 0..7 is placed in every position of an
// 8-value vector and the 7-bit codes are compared with a unary code computed
// here (value v gives v ones from the bottom). A second instance checks that
// 1-bit activations pass through unchanged.
module tb_thermo_enc;
  localparam int unsigned N = 8, B = 3, NT = 7;

  logic [N*B-1:0]  in3;
  logic [N*NT-1:0] out3;
  logic [15:0]     in1, out1;

  thermo_enc #(.N(N), .B(B)) dut3 (.in_data(in3), .out_bits(out3));
  thermo_enc #(.N(16), .B(1)) dut1 (.in_data(in1), .out_bits(out1));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 64; trial++) begin
      int unsigned v [N];
      for (int i = 0; i < N; i++) begin
        v[i] = (trial < 8) ? trial : $urandom_range(0, 7);
        in3[i*B +: B] = B'(v[i]);
      end
      in1 = 16'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        logic [NT-1:0] e;
        e = NT'((1 << v[i]) - 1);
        checks++;
        if (out3[i*NT +: NT] != e) begin
          failures++;
          $display("value %0d: got %b exp %b", v[i], out3[i*NT +: NT], e);
        end
      end
      checks++;
      if (out1 != in1) begin failures++; $display("1-bit: got %h exp %h", out1, in1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
