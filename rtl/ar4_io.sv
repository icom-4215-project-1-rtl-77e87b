// ar4_io: memory-mapped I/O of the RISC AR4 - keyboard and ASCII display.
//
// The processor reaches its two devices through the top six memory
// addresses: 250-251 read the 16-bit keyboard input (250 the high byte, 251
// the low byte) and 252-255 are four display bytes, one ASCII character each
// (252 the leftmost). This block sits between the memory bus and the memory:
// it decodes the address, keeps writes to 250..255 away from the memory,
// stores display writes in its own registers and, one clock after a read (the
// memory's read latency), returns either the memory byte or the device byte
// on rdata. Writes to the keyboard addresses are ignored; reads of the display
// addresses return what was last written.
//
// The addresses and the roles of the devices follow the processor
// description. The byte order of the keyboard word, the left-to-right order of
// the display, the read-back of the display and the reset of the display to
// ASCII spaces are this design's choices.
module ar4_io
  import ar4_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // bus side
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  // memory side
  output logic              mem_we,
  input  logic [DATA_W-1:0] mem_rdata,
  // devices
  input  logic [15:0]       kbd,
  output logic [3:0][DATA_W-1:0] display   // display[0] is address 252
);

  logic              io_sel;
  logic              io_rsel_q;
  logic [DATA_W-1:0] io_rdata_q;

  assign io_sel = (addr >= KBD_HI_ADDR);   // 250..255
  assign mem_we = we && !io_sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      display    <= {4{8'h20}};
      io_rsel_q  <= 1'b0;
      io_rdata_q <= '0;
    end else begin
      io_rsel_q <= io_sel;
      if (addr == KBD_HI_ADDR)      io_rdata_q <= kbd[15:8];
      else if (addr == KBD_LO_ADDR) io_rdata_q <= kbd[7:0];
      else                          io_rdata_q <= display[addr[1:0]];
      if (we && addr >= DISP_BASE) display[addr[1:0]] <= wdata;
    end
  end

  assign rdata = io_rsel_q ? io_rdata_q : mem_rdata;

  // Device addresses are never written into the memory
  a_no_mem_write_to_devices: assert property (@(posedge clk) disable iff (rst)
    mem_we |-> addr < KBD_HI_ADDR);

endmodule
