// dioph_pkg -- defaults shared by the hyperplane point generator and the
// load-balancing platform built around it.
//
// The platform enumerates, for each parallel time step t, every integer
// point (i1..iD) with 0 <= ip <= Lp and i1 + ... + iD = t, and hands the
// points to a pool of processing elements.  The constants below are the
// default sizes used by every module; each module also takes them as
// parameters so that a user can resize a single instance.
//
// DMAX_DEF = 3 follows the three-index example of the I-module chain; the
// other widths and sizes are choices of this implementation (the source
// design gives no word widths, FIFO depths or PE count).
package dioph_pkg;
  // Number of I-modules in the chain (largest loop depth supported).
  localparam int unsigned DMAX_DEF  = 3;
  // Width of an index value, of a loop bound and of the remainder r.
  localparam int unsigned IW_DEF    = 16;
  // Depth of each index FIFO between the Point Generator and the distributor.
  localparam int unsigned FDEPTH_DEF = 16;
  // Number of processing elements.
  localparam int unsigned NPE_DEF   = 4;
  // Main-memory address and data widths.
  localparam int unsigned AW_DEF    = 16;
  localparam int unsigned DW_DEF    = 32;

  // Event counters of the platform, brought out for monitoring.
  typedef struct packed {
    logic [31:0] points;        // points handed to PEs
    logic [31:0] steps;         // time steps (hyperplanes) dispatched
    logic [31:0] gen_stall;     // cycles the generator waited for FIFO space
    logic [31:0] ctrl_wait;     // cycles the controller waited for busy PEs
    logic [31:0] empty_planes;  // hyperplanes found empty without enumeration
    logic [31:0] rejects;       // vectors CheckSolution refused (0 normally)
    logic [31:0] bus_conflicts; // cycles a PE waited for the memory bus
  } lb_stats_t;
endpackage
