// thermo_enc: thermometer encoder between the quantized front end and the
// weightless layers.
//
// Each of the N input activations is a B-bit unsigned integer v; it becomes
// 2^B-1 bits where bit j is 1 when v > j (v ones from the bottom). Value i
// lands at out_bits[i*(2^B-1) +: 2^B-1]. For B = 1 the code is the bit
// itself. The thresholds are the integer steps of the quantized activation,
// which is this design's choice; the encoding is purely combinational.
module thermo_enc #(
  parameter int unsigned N = 3200,
  parameter int unsigned B = 1
) (
  input  logic [N*B-1:0]               in_data,
  output logic [N*((1 << B) - 1)-1:0]  out_bits
);
  localparam int unsigned NT = (1 << B) - 1;

  for (genvar i = 0; i < N; i++) begin : g_val
    for (genvar j = 0; j < NT; j++) begin : g_bit
      assign out_bits[i*NT + j] = (in_data[i*B +: B] > B'(j));
    end
  end

endmodule
