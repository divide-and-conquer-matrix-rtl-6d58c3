// aspe_dnet: the data network (D-Net) of ASPE B, a full crossbar from
// every unit output to every unit input that the sequencer reconfigures
// in every clock cycle.
//
// Each of the NSNK sinks (unit operand inputs, storage write ports and
// the output buffer) has a 4-bit field in ctrl.sel naming one of the NSRC
// sources (aspe_pkg::src_e); source 0 and unused codes give zero. Several
// sinks may read the same source, which lets a program chain storage and
// functional units without a central register file. The network is
// purely combinational: what a source shows in a cycle reaches the
// selected sinks in the same cycle.
//
// From the document: a network between functional and storage units,
// reconfigured by the sequencer every cycle. This design's own choices:
// the full crossbar and the encoding of the select fields.
module aspe_dnet
  import aspe_pkg::*;
(
  input  dnet_ctrl_t ctrl,
  input  simd_t      src [NSRC],
  output simd_t      snk [NSNK]
);

  always_comb begin
    for (int k = 0; k < NSNK; k++) begin
      if (32'(ctrl.sel[k]) < NSRC) snk[k] = src[ctrl.sel[k]];
      else                         snk[k] = '0;
    end
  end

endmodule
