// wire_link: a JTEC-SQED protected wired link between two router ports.
//
// The sending port's flit data is encoded into 78 wires by jtec_sqed_encoder. The flit type and
// VC travel beside it on 4 sideband wires. At the receiving port, jtec_sqed_decoder corrects up
// to three wire errors. When it detects a four-error pattern, the link withholds the flit from
// the receiver and reports it as not taken. The sender then keeps the flit and offers it again
// on the next cycle (retransmission). 'err' is an error mask XORed onto the 78 coded wires; it
// models transient noise for testing and is tied to zero in a real system.
//
// Timing: combinational from sender to receiver. The encoder sits at the end of the sender's
// cycle and the decoder at the start of the receiver's, and the receiving VC buffer is the
// register. The flit is taken in the cycle it is offered unless a retransmission is needed.
// Signals: up_* face the sending router's output port, dn_* the receiving router's input port.
// The codes, the encoder-at-output/decoder-at-input placement and retransmission on detection
// follow the text. The uncoded sideband and the one-cycle retry are this design's choices.
module wire_link
  import winoc_pkg::*;
(
  input  logic           up_valid,
  input  flit_t          up_flit,
  output logic [NVC-1:0] up_vc_ready,
  output logic           up_taken,
  output logic           dn_valid,
  output flit_t          dn_flit,
  input  logic [NVC-1:0] dn_vc_ready,
  input  logic [77:0]    err,
  output logic           corrected,
  output logic           retry
);
  logic [77:0] wires;
  logic [31:0] dec;
  logic        unc;

  jtec_sqed_encoder u_enc (.d(up_flit.data), .w(wires));
  jtec_sqed_decoder u_dec (.w(wires ^ err), .d(dec), .corrected(corrected), .uncorrectable(unc));

  always_comb begin
    dn_flit       = up_flit;
    dn_flit.data  = dec;
    dn_valid      = up_valid && !unc;
    up_vc_ready   = dn_vc_ready;
    up_taken      = dn_valid && dn_vc_ready[up_flit.vc];
    retry         = up_valid && unc;
  end
endmodule
