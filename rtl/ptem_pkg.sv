// ptem_pkg: shared constants and types of the per-task energy metering (PTEM) logic.
//
// The LLC action encoding follows the six LLC access types the design meters
// (read/write hit, read/write miss replacing a clean line, read/write miss
// replacing a dirty line); the two bus actions are address-only and cache-line
// transfers. ptem_cfg_t holds the energy figures the chip vendor supplies
// (per-action energies, per-cycle static and leakage energies, and the core's
// maximum, minimum and leakage energy per metering interval). Energies are
// unsigned integers in an arbitrary energy unit chosen by the integrator.
package ptem_pkg;

  localparam int unsigned LLC_ACTIONS = 6;
  localparam int unsigned BUS_ACTIONS = 2;
  localparam int unsigned E_W         = 32;  // width of every energy figure
  localparam int unsigned CNT_W       = 32;  // width of per-interval event counts
  localparam int unsigned EMR_W       = 64;  // width of an Energy Metering Register
  localparam int unsigned CUM_W       = 48;  // cumulated occupancy counter width

  typedef enum logic [2:0] {
    LLC_RD_HIT        = 3'd0,
    LLC_WR_HIT        = 3'd1,
    LLC_RD_MISS_CLEAN = 3'd2,
    LLC_RD_MISS_DIRTY = 3'd3,
    LLC_WR_MISS_CLEAN = 3'd4,
    LLC_WR_MISS_DIRTY = 3'd5
  } llc_action_e;

  typedef enum logic {
    BUS_ADDR = 1'b0,
    BUS_LINE = 1'b1
  } bus_action_e;

  typedef struct packed {
    logic [LLC_ACTIONS-1:0][E_W-1:0] e_llc_action;   // energy per LLC action
    logic [E_W-1:0]                  e_llc_st;       // LLC static energy per idle cycle
    logic [E_W-1:0]                  e_llc_leak;     // LLC leakage energy per cycle
    logic [BUS_ACTIONS-1:0][E_W-1:0] e_inbus_action; // intracluster bus energy per action
    logic [E_W-1:0]                  e_inbus_leak;   // intracluster bus leakage per cycle
    logic [BUS_ACTIONS-1:0][E_W-1:0] e_outbus_action;// intercluster bus energy per action
    logic [E_W-1:0]                  e_outbus_leak;  // intercluster bus leakage per cycle
    logic [E_W-1:0]                  e_core_max;     // core energy per interval, power virus
    logic [E_W-1:0]                  e_core_min;     // core energy per interval, no-op loop
    logic [E_W-1:0]                  e_core_leak;    // core energy per interval, halt mode
  } ptem_cfg_t;

  // Classify an LLC access into one of the six metered actions.
  function automatic llc_action_e llc_classify(input logic is_write, input logic hit,
                                               input logic dirty_victim);
    if (hit)                return is_write ? LLC_WR_HIT : LLC_RD_HIT;
    else if (dirty_victim)  return is_write ? LLC_WR_MISS_DIRTY : LLC_RD_MISS_DIRTY;
    else                    return is_write ? LLC_WR_MISS_CLEAN : LLC_RD_MISS_CLEAN;
  endfunction

endpackage
