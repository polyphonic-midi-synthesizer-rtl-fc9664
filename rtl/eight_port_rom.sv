// eight_port_rom: eight read ports onto one single-port waveform ROM.
//
// The eight note generators run on the 78.125 kHz sample clock, 256 cycles of
// the 20 MHz clock, so one ROM can serve them all in turn. Each port's address
// first passes two flip-flops on the fast clock (a synchronizer from the sample
// clock domain). A 3-bit port counter steps 0..7 on every fast clock; it
// selects one synchronized address for the ROM through an 8-input mux and
// enables that port's data register, which loads the ROM word at the next fast
// edge. A new address therefore reaches its data register within 2 + 8 fast
// cycles, long before the next sample clock edge 256 fast cycles later reads
// it. The ports are given as arrays. Structure and cycle counts follow the
// original design; the asynchronous reset is this design's choice.
module eight_port_rom
  import synth_pkg::*;
#(
  parameter int unsigned PORTS  = NUM_VOICES,
  parameter int unsigned ADDR_W = ROM_ADDR_W
) (
  input  logic              fast_clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] addr [PORTS],
  output sample_t           data [PORTS]
);
  localparam int unsigned PORT_W = (PORTS > 1) ? $clog2(PORTS) : 1;

  logic [ADDR_W-1:0] addr_s1 [PORTS];   // synchronizer, first stage
  logic [ADDR_W-1:0] addr_s2 [PORTS];   // synchronizer, second stage
  logic [PORT_W-1:0] port;
  logic [ADDR_W-1:0] rom_addr;
  sample_t           rom_data;

  always_ff @(posedge fast_clk or posedge reset)
    if (reset) begin
      for (int p = 0; p < PORTS; p++) begin
        addr_s1[p] <= '0;
        addr_s2[p] <= '0;
      end
    end else begin
      for (int p = 0; p < PORTS; p++) begin
        addr_s1[p] <= addr[p];
        addr_s2[p] <= addr_s1[p];
      end
    end

  always_ff @(posedge fast_clk or posedge reset)
    if (reset)                          port <= '0;
    else if (port == PORT_W'(PORTS - 1)) port <= '0;
    else                                port <= port + 1'b1;

  assign rom_addr = addr_s2[port];

  waveform_rom #(.ADDR_W(ADDR_W)) u_rom (.addr(rom_addr), .data(rom_data));

  always_ff @(posedge fast_clk or posedge reset)
    if (reset) begin
      for (int p = 0; p < PORTS; p++) data[p] <= '0;
    end else begin
      data[port] <= rom_data;
    end
endmodule
