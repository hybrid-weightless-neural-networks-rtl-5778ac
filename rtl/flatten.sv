// flatten: gathers the pixels of one activation map into a single vector for
// the weightless classifier.
//
// N_PIX pixels of PIX_W bits arrive in order over a valid/ready stream;
// pixel p is stored at out_data[p*PIX_W +: PIX_W] (row-major pixel order,
// channel order inside a pixel). When the last pixel is stored, out_valid
// rises and stays until out_ready; no new pixel is accepted meanwhile, so
// the next map is collected once the vector is taken. Since the classifier
// behind it takes one vector per cycle, this costs one cycle per map.
module flatten #(
  parameter int unsigned N_PIX = 25,
  parameter int unsigned PIX_W = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [PIX_W-1:0]        in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [N_PIX*PIX_W-1:0]  out_data
);
  localparam int unsigned PB = (N_PIX < 2) ? 1 : $clog2(N_PIX);

  logic [PB-1:0] idx;

  assign in_ready = !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        out_data[int'(idx)*PIX_W +: PIX_W] <= in_data;
        if (idx == PB'(N_PIX - 1)) begin
          idx       <= '0;
          out_valid <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
