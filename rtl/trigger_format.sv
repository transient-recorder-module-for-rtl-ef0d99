// Channel trigger format block.
//
// Merges the channel's trigger sources into one trigger pulse CHx_TRG: the
// digital self trigger, the external TTL trigger (already synchronised to a
// one-clock pulse) and the software trigger register bit. The self and external
// sources each have a user mask bit; the software trigger is an explicit
// register write and is always honoured. Purely combinational.
//
// The three sources and the masks follow the design description; the OR of
// the sources and leaving the software trigger unmasked are choices of this
// design.
module trigger_format (
  input  logic self_trg,
  input  logic ext_trg,
  input  logic soft_trg,
  input  logic self_en,
  input  logic ext_en,
  output logic ch_trg
);
  assign ch_trg = (self_trg & self_en) | (ext_trg & ext_en) | soft_trg;
endmodule
