// face_recog_top: the face recognition accelerator.
//
// The ANN classifier of a PCA + ANN face recognition system runs on the
// MUSRA coarse-grained reconfigurable array (musra). The host processor
// projects a face image onto the eigenfaces (PCA), places the 30-element
// feature vector and the trained weights in the array's memories, and runs
// one context per step: the dot products of a layer (an unrolled multiply
// and adder tree per neuron), then the piecewise-quadratic sigmoid, for the
// hidden layer and then the output layer. The context that computes the
// output layer's activations carries the "decide" flag, so its three results
// also reach decision_unit, which applies the recognition rule (thresholds
// 0.9 and 0.1 in Q6.10) and drives decision_o: 3'b100 first person, 3'b010
// second, 3'b001 third, 3'b000 stranger.
//
// Ports: a word-addressed host bus (see cgra_interface for the map),
// irq_o (sticky done interrupt), finish_o (one-clock pulse when a context
// ends), ann_out_o / decision_o with decision_valid_o. The port names
// finish, output and decision follow the source's simulation waveforms; the
// host bus replaces the AXI connection of the platform.
module face_recog_top
  import musra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] bus_addr_i,
  input  logic [31:0] bus_wdata_i,
  input  logic        bus_we_i,
  input  logic        bus_re_i,
  output logic [31:0] bus_rdata_o,
  output logic        bus_rvalid_o,
  output logic        irq_o,
  output logic        finish_o,
  output word_t       ann_out_o [3],
  output logic [2:0]  decision_o,
  output logic        decision_valid_o
);

  logic  res_valid;
  word_t res [3];

  musra u_musra (
    .clk, .rst_n,
    .bus_addr_i, .bus_wdata_i, .bus_we_i, .bus_re_i, .bus_rdata_o, .bus_rvalid_o,
    .irq_o, .done_o(finish_o), .res_valid_o(res_valid), .res_o(res)
  );

  decision_unit u_decide (
    .clk, .rst_n, .valid_i(res_valid), .out_i(res),
    .out_o(ann_out_o), .decision_o, .valid_o(decision_valid_o)
  );

endmodule
