// pic_model: behavioural model of the note-handling microcontroller that
// drives the synthesizer (simulation only, not synthesizable).
//
// It receives MIDI bytes one at a time (task rx_byte, one byte per BYTE_CYCLES
// clocks, 1736 cycles of 20 MHz being one 10-bit frame at 115.2 kbaud). It
// waits for a status byte whose upper nibble is 8 (note off) or 9 (note on),
// ignoring other bytes, and on it drops `en` and sets `onoff` from bit 4 of
// the status byte. The next byte is the key and the one after the velocity;
// both are put on their outputs as they arrive. Then it assigns a note
// generator from an eight-entry table of held keys (0 = free): a note-on takes
// the first free entry, or entry 7 if all are held (voice stealing); a
// note-off searches for the key, frees the entry and reports it. A note-off
// for a key that is in no entry is dropped: `en` stays low. Otherwise `sel`
// is set and `en` raised, and stays high until the next status byte. Outputs
// change on the falling clock edge. Counters report how often each case
// occurred.
module pic_model #(
  parameter int BYTE_CYCLES = 1736
) (
  input  logic       clk,
  output logic [6:0] key,
  output logic [6:0] velocity,
  output logic       onoff,
  output logic       en,
  output logic [2:0] sel
);
  typedef enum logic [1:0] {WAIT_STATUS, WAIT_KEY, WAIT_VEL} rx_state_t;

  rx_state_t  state = WAIT_STATUS;
  logic [6:0] held [8];
  int n_on = 0, n_off = 0, n_steal = 0, n_dropped = 0;

  initial begin
    key = '0; velocity = '0; onoff = 1'b0; en = 1'b0; sel = '0;
    for (int i = 0; i < 8; i++) held[i] = '0;
  end

  task automatic assign_voice();
    int i;
    i = 0;
    if (onoff) begin
      while (held[i] != 7'd0 && i < 7) i++;
      if (held[i] != 7'd0) n_steal++;
      held[i] = key;
      sel = 3'(i);
      en = 1'b1;
      n_on++;
    end else begin
      while (held[i] != key && i < 7) i++;
      if (held[i] != key) begin
        n_dropped++;
      end else begin
        held[i] = 7'd0;
        sel = 3'(i);
        en = 1'b1;
        n_off++;
      end
    end
  endtask

  task automatic rx_byte(input logic [7:0] b);
    repeat (BYTE_CYCLES) @(negedge clk);
    case (state)
      WAIT_STATUS:
        if (b[7:4] == 4'h8 || b[7:4] == 4'h9) begin
          en    = 1'b0;
          onoff = b[4];
          state = WAIT_KEY;
        end
      WAIT_KEY: begin
        key   = b[6:0];
        state = WAIT_VEL;
      end
      default: begin
        velocity = b[6:0];
        state    = WAIT_STATUS;
        assign_voice();
      end
    endcase
  endtask

  task automatic send_note(input logic on, input logic [6:0] k, input logic [6:0] v);
    rx_byte(on ? 8'h90 : 8'h80);
    rx_byte({1'b0, k});
    rx_byte({1'b0, v});
  endtask
endmodule
