// hp_tcam_pkg: sizes shared by the HP-TCAM modules.
//
// The HP-TCAM emulates a ternary CAM of ENTRIES words of W bits with ordinary
// synchronous RAM. The table is cut into N vertical partitions of w = W/N
// bits and L horizontal partitions (layers) of K = ENTRIES/L addresses. The
// defaults are the 512 x 36 example with L = 2 and N = 4, the configuration
// with the lowest energy per bit per search among those evaluated. B, the
// log2 of the number of presence bits per bit-position-table row, is not
// fixed by the architecture; B = 4 (16 bits per row) is this design's choice.
package hp_tcam_pkg;

  parameter int unsigned ENTRIES_DEF = 512;  // TCAM words
  parameter int unsigned W_DEF   = 36;   // TCAM word width
  parameter int unsigned L_DEF   = 2;    // layers (horizontal partitions)
  parameter int unsigned N_DEF   = 4;    // vertical partitions per layer
  parameter int unsigned B_DEF   = 4;    // log2 of presence bits per BPT row

  // Search latency in clock cycles: BPT read, 1's counter, adder + APT
  // read, K-bit AND, priority encoders.
  parameter int unsigned LATENCY = 5;

endpackage
