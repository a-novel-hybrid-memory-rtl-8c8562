// Shared constants of the semi-parallel hybrid SRAM/DRAM (SPHSD) packet buffer.
//
// The packet buffer moves data in bus words of W bits. One bus word is also one
// block, the unit that is written to and read from a DRAM, and one clock cycle is
// one time slot (the time to receive one block at line rate). The defaults below
// are the main configuration: a 512-bit bus and k = 20 parallel DRAMs (banks), the
// value derived for a 100 Gbit/s line card with DDR3 SDRAM. The number of flow
// queues Q is not fixed by the design description; 256 is an own choice for a
// line card with many virtual output queues. A module that uses only some of
// these constants gets verilator's unused-parameter note for the others; they
// are defaults, not circuit.
package sphsd_pkg;
  localparam int unsigned W_DEF      = 512;   // data bus width in bits (one block)
  localparam int unsigned K_DEF      = 20;    // parallel DRAMs / banks
  localparam int unsigned Q_DEF      = 256;   // flow queues (own choice)
  localparam int unsigned MAXLEN_DEF = 9216;  // largest packet in bytes (own choice)

endpackage
