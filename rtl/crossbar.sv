// crossbar: NPORTS x NPORTS word-wide crossbar of the switch core.
//
// Each output takes the word, valid and last flags of the input selected by the
// central scheduler while its connection is active (`out_en`); an idle output
// sees no valid word. The path is combinational: the input ports register the
// data they read from their buffers and the output ports register what they
// receive, so crossbar traversal takes one of those register-to-register cycles.
// With a 64-bit word at 250 MHz the crossbar moves 16 Gb/s per port, twice the
// 8 Gb/s line rate, giving the internal speedup of two that the combined
// input/output-queued organisation relies on.
module crossbar
  import qos_pkg::*;
#(
  parameter int unsigned NPORTS = 16
) (
  input  logic [NPORTS-1:0]          in_valid,
  input  word_t                      in_data [NPORTS],
  input  logic [NPORTS-1:0]          in_last,
  input  logic [NPORTS-1:0]          out_en,
  input  logic [$clog2(NPORTS)-1:0]  out_sel [NPORTS],
  output logic [NPORTS-1:0]          out_valid,
  output word_t                      out_data [NPORTS],
  output logic [NPORTS-1:0]          out_last
);
  always_comb begin
    for (int o = 0; o < int'(NPORTS); o++) begin
      out_valid[o] = out_en[o] && in_valid[out_sel[o]];
      out_last[o]  = out_en[o] && in_last[out_sel[o]];
      out_data[o]  = in_data[out_sel[o]];
    end
  end
endmodule
