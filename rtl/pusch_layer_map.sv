// pusch_layer_map: PUSCH layer mapping onto 1 to 4 layers.
//
// Consecutive modulation symbols are dealt round-robin over the n_layers
// layers (symbol i goes to layer i mod n_layers, 3GPP TS 38.211 6.3.1.3).
// Once n_layers symbols have been collected the block emits them together
// as one vector, layer l in layers_out[l]; layers at and above n_layers
// are zero. The 1-to-4 layer range follows the transmitter description;
// the collect-then-emit form is this design's own.
//
// Timing: valid_out rises one clock after the valid_in of the vector's
// last symbol. 'load' clears a partly collected vector.
module pusch_layer_map
  import pusch_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] n_layers,
  input  logic       load,
  input  logic       valid_in,
  input  cplx16_t    sym_in,
  output logic       valid_out,
  output cplx16_t    layers_out [MAXL]
);

  logic [1:0] idx;
  cplx16_t    acc [MAXL];
  logic [2:0] nl;

  assign nl = (n_layers == 3'd0 || n_layers > 3'd4) ? 3'd1 : n_layers;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      valid_out <= 1'b0;
      for (int l = 0; l < MAXL; l++) begin
        acc[l]        <= '0;
        layers_out[l] <= '0;
      end
    end else begin
      valid_out <= 1'b0;
      if (load) begin
        idx <= '0;
      end else if (valid_in) begin
        if ({1'b0, idx} == nl - 3'd1) begin
          idx       <= '0;
          valid_out <= 1'b1;
          for (int l = 0; l < MAXL; l++) begin
            if (l == int'(idx))      layers_out[l] <= sym_in;
            else if (l < int'(idx))  layers_out[l] <= acc[l];
            else                     layers_out[l] <= '0;
          end
        end else begin
          acc[idx] <= sym_in;
          idx      <= idx + 2'd1;
        end
      end
    end
  end

endmodule
