// lu_pkg: types and constants shared by the blocks of the BDB LU machine.
//
// The machine is a six-processor shared-memory multiprocessor. Its processors
// reach every memory and peripheral through a fully connected multi-master
// bus with Avalon-style transfers, modelled here by two packed structs:
//   av_req_t  - what a master drives: read, write, byte address, write data,
//               byte enables. A master holds it until waitrequest is low.
//   av_rsp_t  - what a slave returns: waitrequest and readdata. For a read,
//               readdata is valid in the cycle in which waitrequest is low.
// The address map follows the SSRAM windows the design assigns (SSRAM 1 at
// 0x100000, SSRAM 2 at 0x200000, 1 MB each); the placement of the on-chip
// RAMs and of the UART and PIO registers is this design's own choice.
package lu_pkg;

  localparam int unsigned DW = 32;   // bus data width (32-bit Nios)
  localparam int unsigned AW = 32;   // bus byte-address width

  typedef struct packed {
    logic            read;
    logic            write;
    logic [AW-1:0]   address;
    logic [DW-1:0]   writedata;
    logic [DW/8-1:0] byteenable;
  } av_req_t;

  typedef struct packed {
    logic          waitrequest;
    logic [DW-1:0] readdata;
  } av_rsp_t;

  // Pins of one synchronous burst SRAM chip (separate data in and out).
  localparam int unsigned SS_AW_MAX = 20;
  typedef struct packed {
    logic [SS_AW_MAX-1:0] addr;   // word address
    logic [DW-1:0]        d;      // write data
    logic                 ce;     // chip enable: an access this cycle
    logic                 we;     // 1 = write, 0 = read
    logic [DW/8-1:0]      be;     // byte write enables
  } ssram_pins_t;

  // Custom-instruction select of the FPU (four custom instructions).
  typedef enum logic [1:0] {
    FP_ADD = 2'd0,
    FP_SUB = 2'd1,
    FP_MUL = 2'd2,
    FP_DIV = 2'd3
  } fp_op_e;

  // Machine size
  localparam int unsigned N_CPU = 6;          // five computation + one control processor
  localparam int unsigned N_MST = 2 * N_CPU;  // bus masters: data 0..5, instruction 6..11
  localparam int unsigned N_SLV = 10;         // 6 on-chip RAMs, 2 SSRAMs, UART, PIO

  // Master index of the instruction master of processor k (0-based)
  localparam int unsigned M_INSTR0 = N_CPU;

  // Slave indices
  localparam int unsigned S_RAM0  = 0;        // on-chip RAM of processor k is slave k
  localparam int unsigned S_SSRAM1 = 6;
  localparam int unsigned S_SSRAM2 = 7;
  localparam int unsigned S_UART  = 8;
  localparam int unsigned S_PIO   = 9;

  // Address map: base and size of each slave window (bytes)
  localparam logic [AW-1:0] RAM_BASE   = 32'h0000_0000;
  localparam logic [AW-1:0] RAM_STRIDE = 32'h0000_2000;   // 8 KB window, 7 KB populated
  localparam logic [AW-1:0] SSRAM1_BASE = 32'h0010_0000;
  localparam logic [AW-1:0] SSRAM2_BASE = 32'h0020_0000;
  localparam logic [AW-1:0] SSRAM_SIZE  = 32'h0010_0000;
  localparam logic [AW-1:0] UART_BASE  = 32'h0030_0000;
  localparam logic [AW-1:0] PIO_BASE   = 32'h0030_0020;
  localparam logic [AW-1:0] REG_SIZE   = 32'h0000_0020;

  localparam logic [N_SLV-1:0][AW-1:0] SLV_BASE = '{
    PIO_BASE, UART_BASE, SSRAM2_BASE, SSRAM1_BASE,
    RAM_BASE + 5*RAM_STRIDE, RAM_BASE + 4*RAM_STRIDE, RAM_BASE + 3*RAM_STRIDE,
    RAM_BASE + 2*RAM_STRIDE, RAM_BASE + 1*RAM_STRIDE, RAM_BASE};
  localparam logic [N_SLV-1:0][AW-1:0] SLV_SIZE = '{
    REG_SIZE, REG_SIZE, SSRAM_SIZE, SSRAM_SIZE,
    RAM_STRIDE, RAM_STRIDE, RAM_STRIDE, RAM_STRIDE, RAM_STRIDE, RAM_STRIDE};

  // Which master may reach which slave (bit s of entry m). Every processor's
  // data master reaches every on-chip RAM (partial sums are exchanged
  // there). Processors 1-3 use SSRAM 1, processors 4-5 use SSRAM 2,
  // processor 6 (control) reaches both SSRAMs, the UART and the PIO. The
  // SSRAMs also hold the programs: instruction master k fetches from the
  // SSRAM(s) of processor k only.
  localparam logic [N_SLV-1:0] CONN_ALL_RAM = 10'b00_0011_1111;
  localparam logic [N_MST-1:0][N_SLV-1:0] SLV_CONN = '{
    10'b00_1100_0000,                 // instruction master of processor 6
    10'b00_1000_0000,                 // instruction master of processor 5
    10'b00_1000_0000,                 // instruction master of processor 4
    10'b00_0100_0000,                 // instruction master of processor 3
    10'b00_0100_0000,                 // instruction master of processor 2
    10'b00_0100_0000,                 // instruction master of processor 1
    10'b11_1111_1111,                 // processor 6 (index 5)
    CONN_ALL_RAM | 10'b00_1000_0000,  // processor 5 -> SSRAM 2
    CONN_ALL_RAM | 10'b00_1000_0000,  // processor 4 -> SSRAM 2
    CONN_ALL_RAM | 10'b00_0100_0000,  // processor 3 -> SSRAM 1
    CONN_ALL_RAM | 10'b00_0100_0000,  // processor 2 -> SSRAM 1
    CONN_ALL_RAM | 10'b00_0100_0000}; // processor 1 -> SSRAM 1

endpackage
