// gc_pkg: constants and types shared by the gain-cell eDRAM test chip.
//
// The array geometry follows the 2 kb test array: 64 rows of 32 bits, plus
// one replica column of 32 cells. The timer width, the configuration record
// loaded through the scan chain, the array access bundle and the test-mode
// and controller-state encodings are this design's own choices.
package gc_pkg;

  localparam int unsigned ROWS     = 64;  // array rows (words)
  localparam int unsigned COLS     = 32;  // bits per row
  localparam int unsigned REPLICAS = 32;  // replica cells in the replica column
  localparam int unsigned AW       = $clog2(ROWS);
  localparam int unsigned RAW      = $clog2(REPLICAS);
  localparam int unsigned TW       = 24;  // width of the controller's period timers

  // Controller configuration, loaded through the configuration scan chain.
  // A period of zero switches the corresponding activity off.
  typedef struct packed {
    logic [TW-1:0]   idle_period;     // Idle cycles before each CheckReplica
    logic [TW-1:0]   disturb_period;  // cycles between Disturb writes (0 = none)
    logic [TW-1:0]   pseudo_period;   // cycles between replica pseudo-writes (0 = none)
    logic [AW-1:0]   victim_addr;     // row that receives the all-ones Disturb writes
    logic [COLS-1:0] pattern;         // data word written to every other row
  } cfg_t;

  // One cycle of access to the array and its replica column.
  typedef struct packed {
    logic            wen;             // write enable (also drives the replica WBL)
    logic [AW-1:0]   waddr;
    logic [COLS-1:0] wdata;
    logic            ren;             // read enable, data valid the next cycle
    logic [AW-1:0]   raddr;
    logic            pseudo_write;    // charge the replica WBL without writing
    logic            refresh_replica; // write '0' to all replica cells
    logic            check_replica;   // read one replica cell
    logic [RAW-1:0]  rep_addr;
  } acc_t;

  localparam acc_t ACC_IDLE = '0;

  // Who drives the array.
  typedef enum logic [1:0] {
    MODE_CTRL   = 2'd0,  // on-chip test controller, at speed
    MODE_SCAN   = 2'd1,  // access word loaded through the scan chain
    MODE_DIRECT = 2'd2   // external pins drive the array directly
  } mode_e;

  // Test controller states.
  typedef enum logic [3:0] {
    ST_RESET       = 4'd0,
    ST_INIT_WRITE  = 4'd1,
    ST_INIT_REPL   = 4'd2,
    ST_IDLE        = 4'd3,
    ST_DISTURB     = 4'd4,
    ST_CHECK       = 4'd5,
    ST_REFRESH_REP = 4'd6,
    ST_READ        = 4'd7,
    ST_WRITE_BACK  = 4'd8,
    ST_DONE        = 4'd9
  } state_e;

endpackage
