// voice_decoder: the controller in front of the eight note generators.
//
// The 3-bit select from the microcontroller names the note generator the
// current message is for. It is decoded one-hot and each bit is ANDed with the
// enable pulse, so exactly one note generator sees a one-cycle load enable per
// message and the others keep their state. Combinational. The decoder and the
// AND with the edge-detected enable follow the original design.
module voice_decoder
  import synth_pkg::*;
(
  input  sel_t                  sel,
  input  logic                  en_pulse,
  output logic [NUM_VOICES-1:0] voice_en
);
  always_comb begin
    voice_en = '0;
    voice_en[sel] = en_pulse;
  end

  // At most one note generator is loaded per message.
  always_comb a_onehot: assert ((voice_en & (voice_en - 1'b1)) == '0);
endmodule
