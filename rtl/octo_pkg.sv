// octo_pkg: types and constants shared by the split-trust hardware.
//
// The machine is split into physically isolated trust domains, each with its own
// processor and memory, that talk only through hardware mailboxes and a few
// permanent hardware queues. This package holds the domain identifiers, the
// mailbox command and status formats and the hard-wired map of which domain sits
// on the fixed end of each of the twelve mailboxes.
//
// The set of domains (resource manager, untrusted domain, two TEEs, serial input,
// serial output, storage, network, TPM mediator), the twelve mailboxes and their
// message sizes (control plane 4 x 64 B, data plane 4 x 512 B) follow the
// prototype. The numeric identifiers, the 32-bit word, the 16-bit quota and time
// fields and the assignment of mailboxes to domains are this design's choices.
package octo_pkg;

  // Domain identifiers. DOM_NONE is what a domain without the right to read a
  // status register sees in the owner field.
  typedef enum logic [3:0] {
    DOM_RM         = 4'd0,   // resource manager
    DOM_UNTRUSTED  = 4'd1,   // commodity OS on the application CPU
    DOM_TEE1       = 4'd2,
    DOM_TEE2       = 4'd3,
    DOM_KEYBOARD   = 4'd4,   // serial input
    DOM_SERIAL_OUT = 4'd5,
    DOM_STORAGE    = 4'd6,
    DOM_NETWORK    = 4'd7,
    DOM_TPM_PROXY  = 4'd8,   // microcontroller that mediates TPM access
    DOM_NONE       = 4'd15
  } dom_id_e;

  localparam int unsigned N_DOM   = 9;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned QUOTA_W = 16;
  localparam int unsigned TIME_W  = 16;

  // A message quota of all ones means "no message limit". The time limit has no
  // such value: a delegation with a zero time limit is refused.
  localparam logic [QUOTA_W-1:0] QUOTA_INFINITE = '1;

  // Message sizes in 32-bit words.
  localparam int unsigned CTRL_MSG_WORDS = 64 / 4;
  localparam int unsigned DATA_MSG_WORDS = 512 / 4;
  localparam int unsigned QUEUE_MSGS     = 4;

  // Domains wired to the delegable end of every mailbox, by port index. Port 0
  // must be the resource manager: it owns the delegable end after reset.
  localparam int unsigned N_PORTS = 4;
  localparam dom_id_e PORT_DOM [N_PORTS] = '{DOM_RM, DOM_UNTRUSTED, DOM_TEE1, DOM_TEE2};

  typedef enum logic [1:0] {
    MBOX_NOP      = 2'd0,
    MBOX_DELEGATE = 2'd1,   // resource manager hands the delegable end to a domain
    MBOX_YIELD    = 2'd2    // current delegate gives the delegable end back
  } mbox_op_e;

  typedef struct packed {
    mbox_op_e             op;
    dom_id_e              target;  // domain receiving the delegable end
    logic [QUOTA_W-1:0]   quota;   // message limit
    logic [TIME_W-1:0]    tlimit;  // time limit in ticks
  } mbox_cmd_t;

  typedef struct packed {
    logic                 valid;   // 0 in the dummy value
    dom_id_e              owner;   // domain holding the delegable end
    logic [QUOTA_W-1:0]   quota;   // remaining messages
    logic [TIME_W-1:0]    tleft;   // remaining ticks
  } mbox_status_t;

  localparam mbox_status_t STATUS_DUMMY = '{valid: 1'b0, owner: DOM_NONE, quota: '0, tleft: '0};

  // Fixed-reader mailboxes (delegable writer end).
  localparam int unsigned N_FR = 7;
  localparam int unsigned FR_SERIAL_OUT = 0, FR_STO_CMD = 1, FR_STO_DIN = 2,
                          FR_NET_CMD = 3, FR_NET_DIN = 4, FR_TEE1 = 5, FR_TEE2 = 6;
  localparam dom_id_e FR_FIXED_DOM [N_FR] = '{DOM_SERIAL_OUT, DOM_STORAGE, DOM_STORAGE,
                                             DOM_NETWORK, DOM_NETWORK, DOM_TEE1, DOM_TEE2};
  localparam bit FR_DATA_PLANE [N_FR] = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0};

  // Fixed-writer mailboxes (delegable reader end).
  localparam int unsigned N_FW = 5;
  localparam int unsigned FW_KEYBOARD = 0, FW_STO_RESP = 1, FW_STO_DOUT = 2,
                          FW_NET_RESP = 3, FW_NET_DOUT = 4;
  localparam dom_id_e FW_FIXED_DOM [N_FW] = '{DOM_KEYBOARD, DOM_STORAGE, DOM_STORAGE,
                                             DOM_NETWORK, DOM_NETWORK};
  localparam bit FW_DATA_PLANE [N_FW] = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b1};

  localparam int unsigned N_MBOX = N_FR + N_FW;

  // Permanent hardware queues: every microcontroller-side domain to the TPM
  // mediator, and the TEEs and the untrusted domain to the resource manager.
  localparam int unsigned N_HQ = 11;
  localparam dom_id_e HQ_SRC [N_HQ] = '{DOM_RM, DOM_UNTRUSTED, DOM_TEE1, DOM_TEE2, DOM_KEYBOARD,
                                        DOM_SERIAL_OUT, DOM_STORAGE, DOM_NETWORK,
                                        DOM_TEE1, DOM_TEE2, DOM_UNTRUSTED};
  localparam dom_id_e HQ_DST [N_HQ] = '{DOM_TPM_PROXY, DOM_TPM_PROXY, DOM_TPM_PROXY, DOM_TPM_PROXY,
                                        DOM_TPM_PROXY, DOM_TPM_PROXY, DOM_TPM_PROXY, DOM_TPM_PROXY,
                                        DOM_RM, DOM_RM, DOM_RM};

  // Bootloader ROMs, one per microcontroller domain.
  localparam int unsigned N_ROM = 8;
  localparam dom_id_e ROM_DOM [N_ROM] = '{DOM_RM, DOM_TEE1, DOM_TEE2, DOM_KEYBOARD,
                                         DOM_SERIAL_OUT, DOM_STORAGE, DOM_NETWORK, DOM_TPM_PROXY};

endpackage
