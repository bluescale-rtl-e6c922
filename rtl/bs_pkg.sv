// bs_pkg: types and constants shared by the BlueScale memory interconnect.
//
// A memory request carries its absolute deadline (the GEDF priority used by
// the random access buffers) and a route field. Every Scale Element (SE) on
// the way to memory pushes the 2-bit index of the local client port it came
// from into the low bits of the route; on the way back every SE pops those
// two bits to steer the response. The task parameter layout (8-bit task ID,
// 32-bit period, 32-bit execution time, plus a 2-bit client ID in the table)
// follows the document; the 64-bit interface word {Theta, Pi} (32 bits each,
// as wide as the table's period and execution time) and the address, data,
// tag and route widths are this design's own choices.
package bs_pkg;

  parameter int unsigned ADDR_W  = 32;
  parameter int unsigned DATA_W  = 32;
  parameter int unsigned DL_W    = 32;  // absolute deadline of a request
  parameter int unsigned TAG_W   = 8;   // client-private transaction tag
  parameter int unsigned ROUTE_W = 8;   // 2 bits per tree level, up to 4 levels
  parameter int unsigned NPORT   = 4;   // local client ports per SE (quadtree)
  parameter int unsigned VAL_W   = 32;  // period / execution time / counters

  typedef struct packed {
    logic [ADDR_W-1:0]  addr;
    logic               we;
    logic [DATA_W-1:0]  wdata;
    logic [DL_W-1:0]    deadline;
    logic [TAG_W-1:0]   tag;
    logic [ROUTE_W-1:0] route;
  } mem_req_t;

  typedef struct packed {
    logic [DATA_W-1:0]  rdata;
    logic [TAG_W-1:0]   tag;
    logic [ROUTE_W-1:0] route;
  } mem_rsp_t;

  // Task parameters as delivered by a local client: [71:0]
  typedef struct packed {
    logic [7:0]       task_id;
    logic [VAL_W-1:0] period;   // T_i (or Pi of a child server task)
    logic [VAL_W-1:0] wcet;     // C_i (or Theta of a child server task)
  } task_parm_t;

  // One row of the task parameter table: [73:0]
  typedef struct packed {
    logic [1:0] client_id;
    task_parm_t p;
  } task_entry_t;

  // Interface of a virtual element: (Theta, Pi) [63:0]
  typedef struct packed {
    logic [VAL_W-1:0] theta;
    logic [VAL_W-1:0] pi;
  } ve_parm_t;

endpackage
