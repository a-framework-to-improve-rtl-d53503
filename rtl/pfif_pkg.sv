// pfif_pkg: types and constants shared by the Portable Framework Interface (PFIF).
//
// The framework sits between a platform's vendor services and a user IP core.
// Toward the vendor it talks to physical local memory modules and to the host;
// toward the IP it offers registers and logical memory banks. This package holds
// the geometry of one physical local memory module (the Cray XD1 figures: 64-bit
// words, 4 MB per module, four modules), the logical memory bank types of the
// framework, and the request/response structs of the PFC memory port, the
// platform-independent port between the local memory controllers and the
// services logic. Struct layouts and the host address map are this design's own.
package pfif_pkg;

  // Physical local memory module: 64-bit words, 4 MB -> 512 Ki words.
  localparam int unsigned PHYS_W     = 64;
  localparam int unsigned PHYS_BE_W  = PHYS_W / 8;
  localparam int unsigned PHYS_DEPTH = 4 * 1024 * 1024 / (PHYS_W / 8);
  localparam int unsigned PHYS_AW    = $clog2(PHYS_DEPTH);
  localparam int unsigned NUM_PHYS   = 4;

  // Host side: 64-bit data bus (Cray XD1), word addresses.
  localparam int unsigned HOST_W  = 64;
  localparam int unsigned HOST_AW = 28;   // word address on the host slave port
  localparam int unsigned HMEM_AW = 32;   // word address into host main memory

  // Host slave address map: HOST_AW-bit word address, top 4 bits pick a region.
  // Region 0 is the register block, region 1+k is logical memory bank k.
  localparam int unsigned REGION_LSB = 24;

  // Logical memory bank types (Table 2 of the framework description).
  typedef enum logic [2:0] {
    MEM_SHARED_IN    = 3'd0,  // IP reads, host writes
    MEM_SHARED_OUT   = 3'd1,  // IP writes, host reads
    MEM_SHARED_INOUT = 3'd2,  // both read and write
    MEM_LOCAL        = 3'd3,  // IP only, intermediate data
    MEM_SEQ_IN       = 3'd4,  // DMA from host memory, read in order
    MEM_SEQ_OUT      = 3'd5   // DMA to host memory, written in order
  } mem_type_e;

  // PFC memory port: request from services logic to a local memory controller.
  typedef struct packed {
    logic                 valid;
    logic                 we;
    logic [PHYS_AW-1:0]   addr;
    logic [PHYS_W-1:0]    wdata;
    logic [PHYS_BE_W-1:0] be;
  } pfc_mem_req_t;

  // PFC memory port: read data, returned in request order a fixed latency later.
  typedef struct packed {
    logic              valid;
    logic [PHYS_W-1:0] rdata;
  } pfc_mem_rsp_t;

  // Host-memory master (DMA) request; reads return in order, writes are posted.
  typedef struct packed {
    logic               valid;
    logic               we;
    logic [HMEM_AW-1:0] addr;
    logic [HOST_W-1:0]  wdata;
  } hmem_req_t;

  // Register block word indices (region 0 of the host slave port).
  localparam int unsigned REG_CTRL        = 0;  // write bit0: start a run; read: status
  localparam int unsigned REG_LOAD_HADDR  = 1;
  localparam int unsigned REG_LOAD_WORDS  = 2;
  localparam int unsigned REG_LOAD_BANK   = 3;
  localparam int unsigned REG_STORE_HADDR = 4;
  localparam int unsigned REG_STORE_WORDS = 5;
  localparam int unsigned REG_STORE_BANK  = 6;
  localparam int unsigned REG_SQI_HADDR   = 7;
  localparam int unsigned REG_SQI_WORDS   = 8;
  localparam int unsigned REG_SQO_HADDR   = 9;
  localparam int unsigned REG_SQO_WORDS   = 10;
  localparam int unsigned NUM_DESC        = 11;
  localparam int unsigned REG_IN_BASE     = 16; // IP input registers
  localparam int unsigned REG_OUT_BASE    = 32; // IP output registers
  localparam int unsigned REG_IDX_W       = 6;

  // Controller state, readable in the status register.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_LOAD  = 3'd1,
    ST_RUN   = 3'd2,
    ST_DRAIN = 3'd3,
    ST_STORE = 3'd4,
    ST_DONE  = 3'd5
  } ctrl_state_e;

endpackage
