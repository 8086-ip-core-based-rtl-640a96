// mem_sys: memory of the 8086 core, 1 MB of byte-wide address space split
// into a boot ROM and RAM.
//
// The 8086 starts after reset at physical address FFFF0h. The ROM occupies
// the top ROM_BYTES of the space and holds only a far jump to 0000:0400h,
// the start of the program in RAM; the rest of the ROM reads as HLT. All other
// addresses are RAM.
//
// por is the power-on flag: it is 0 from reset until the core reads the jump
// target 00400h. While por is 0 every other read is answered from the ROM
// (the low address bits pick the byte), so the jump is found whatever alias
// the core fetches first. The read of 00400h is served from RAM and sets
// por; from then on the address alone decides between ROM and RAM.
//
// Interface: one access per cycle, rd and wr active high, address and write
// data valid with the strobe. Read data is registered: it is on rdata the
// cycle after rd. Writes into the ROM range are ignored.
//
// What the 8086 bus looks like here (separate read/write strobes, split data
// buses, one-cycle read latency) and the size of the ROM are this design's
// choices; the 20-bit address, 8-bit data, ROM/RAM split and jump target
// are the design's specification.
module mem_sys
  import eps_pkg::*;
#(
  parameter int unsigned ADDR_W    = 20,
  parameter int unsigned ROM_BYTES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic              rd,
  input  logic              wr,
  input  logic [7:0]        wdata,
  output logic [7:0]        rdata,
  output logic              por
);
  // 8086 far jump (opcode EAh, offset, segment) to 0000:0400h; HLT fill.
  localparam logic [7:0]  OP_JMP_FAR  = 8'hEA;
  localparam logic [15:0] BOOT_OFFSET = 16'h0400;
  localparam logic [15:0] BOOT_SEG    = 16'h0000;
  localparam logic [7:0]  OP_HLT      = 8'hF4;

  localparam int unsigned RAM_DEPTH = (2 ** ADDR_W) - ROM_BYTES;
  localparam int unsigned ROM_AW    = $clog2(ROM_BYTES);

  logic [7:0] ram [RAM_DEPTH];
  logic [7:0] ram_q;
  logic [7:0] rom_q;
  logic       rom_sel_q;
  logic       in_rom;
  logic       is_target;

  assign in_rom    = (addr >= ADDR_W'(RAM_DEPTH));
  assign is_target = (addr == ADDR_W'(phys_addr(BOOT_SEG, BOOT_OFFSET)));

  // Boot ROM contents, byte k of the top ROM_BYTES.
  function automatic logic [7:0] rom_byte(input logic [ROM_AW-1:0] k);
    case (k)
      ROM_AW'(0): return OP_JMP_FAR;
      ROM_AW'(1): return BOOT_OFFSET[7:0];
      ROM_AW'(2): return BOOT_OFFSET[15:8];
      ROM_AW'(3): return BOOT_SEG[7:0];
      ROM_AW'(4): return BOOT_SEG[15:8];
      default:    return OP_HLT;
    endcase
  endfunction

  // RAM: synchronous write and registered read.
  always_ff @(posedge clk) begin
    if (wr && !in_rom) ram[addr] <= wdata;
    if (rd && !in_rom) ram_q <= ram[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      por       <= 1'b0;
      rom_sel_q <= 1'b1;
      rom_q     <= '0;
    end else if (rd) begin
      rom_q <= rom_byte(addr[ROM_AW-1:0]);
      if (!por) begin
        // Boot phase: the ROM answers until the jump target is fetched.
        rom_sel_q <= !is_target;
        por       <= is_target;
      end else begin
        rom_sel_q <= in_rom;
      end
    end
  end

  assign rdata = rom_sel_q ? rom_q : ram_q;

  initial assert (ROM_BYTES >= 8 && (2 ** ROM_AW) == ROM_BYTES)
    else $error("mem_sys: ROM_BYTES must be a power of two, at least 8");
endmodule
