// component_synth: spectral component synthesizer.
//
// Mixes MS spectral components into one bit-stream in set proportions. It is a
// chain of MS-1 two-input multiplexers: stage 0 chooses between sc[0] and
// sc[1], stage k chooses between the output of stage k-1 and sc[k+1]. Each
// select line is a weighted pseudo-random bit-stream; when sel[k] is 1 the new
// component sc[k+1] is passed, otherwise the mix built so far. For target
// proportions p0..p(MS-1) the weight of sel[k] is therefore
// p(k+1) / (p0 + ... + p(k+1)); with two stages of weight 0.5 the three inputs
// appear in proportions 0.25, 0.25 and 0.5.
//
// The multiplexer chain and its weighted selects follow the method; which mux
// input a 1 on the select picks is this design's choice. Purely
// combinational: y follows sc and sel in the same cycle.
module component_synth #(
  parameter int unsigned MS = 3
) (
  input  logic [MS-1:0] sc,
  input  logic [MS-2:0] sel,
  output logic          y
);

  logic [MS-1:0] stage;

  assign stage[0] = sc[0];
  for (genvar k = 0; k < MS - 1; k++) begin : g_mux
    assign stage[k+1] = sel[k] ? sc[k+1] : stage[k];
  end
  assign y = stage[MS-1];

endmodule
