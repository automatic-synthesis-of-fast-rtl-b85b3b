# Burst-mode self-timed control circuits

These circuits are controllers with no clock. Each is an asynchronous finite
state machine (AFSM) whose state is held in combinational feedback. A state
variable is a sum-of-products gate that has its own output among its inputs.
The machines are specified in *burst mode*. On each arc of the state graph,
a set of input transitions (the input burst) may arrive in any order and at
any time. The machine stays put until the whole burst has arrived, then moves
to the next state and fires its output burst. Every state change is a single
transition time (STT) change, and the state codes are chosen so that
concurrent state-variable changes form a non-critical race. Outputs are
allowed to change while the state variables change, because an output that
is in the burst is a don't-care in the unstable exit entry of the flow table.

This RTL covers the circuits of the MEAT synthesis method for such machines
(Modified Ensemble Asynchronous Tool, used for the Post Office
communication chip):

| module | what it is |
|---|---|
| `sbuf_send_ctl` | the send-buffer controller of the Post Office, the method's full worked example |
| `afsm_trigger`, `afsm_driver` | input and output boxes of the standard machine partition |
| `c_element` | static C-element, `c = ab + ac + bc` |
| `sendr_done` | a one-state-variable machine shown with its d-trio hazard removed |
| `naking_arbiter` | two-client arbiter that NAKs the loser, a single-input-change machine |
| `sequencer`, `mutex` | serialise concurrent requests for the arbiter; `mutex` is a behavioural model of the analog ME cell |
| `async_dff` | the D flip-flop used to introduce the specification style |
| `meat_examples_top` | all of the above side by side, each with its own ports |

The circuits do not form one system, so the top simply places them next to
each other. A single active-high `rst` clears every state variable.

## How the logic is written

Each state variable is written the way the silicon builds it. There is one
complex CMOS gate per variable, and its output is in negative logic:

```
assign y_gate_n = ~(sum of products, containing y itself);
assign y        = ~(y_gate_n | rst);     // NOR with the reset line
```

The loop `y -> gate -> y` *is* the storage. Lint and synthesis tools report
these as combinational loops, and that is intended. In simulation,
verilator iterates such a loop until it settles. This works because every
equation here is a hazard-free cover that settles to one value for every
allowed input change.

Timing is zero-delay throughout. The wire and gate delays that hazard and
race arguments depend on are not modelled. The logic function, the state
assignment and the burst behaviour are exact. Delay-dependent fixes, such as
inverters added to order two signals, are kept as structure where they
matter for understanding (see `sendr_done`). They cannot be seen in
simulation.

The environment of a burst-mode machine has duties of its own. It may apply
only the bursts the state graph allows. It must also wait until the machine
has settled before the next burst (fundamental mode). The testbenches play
this environment. No hardware checks these duties.

## The machine partition

A machine is cut into four boxes: trigger, state, output and driver.

- **Trigger box** (`afsm_trigger`). It buffers each input once and makes
  one shared inverted copy of it. Sharing one inverter keeps any fork on an
  input inside the machine, where its delays are small and controlled.
- **State box.** One complex gate per state variable, with feedback and
  reset.
- **Output box.** The output equations, also complex gates in negative
  logic.
- **Driver** (`afsm_driver`). An inverter per output restores positive logic
  and drives the load. It also keeps a state variable that doubles as an
  output from forking outside the machine.

`sbuf_send_ctl` is built from exactly these boxes. The Schmitt triggers and
transistor sizing of the real boxes are electrical, not logic, and are
absent here.

## sbuf_send_ctl, the worked example

Inputs are `deliver`, `begin_send` and `ack_send`. Outputs are `latch_addr`,
`idle_bar` and `send_pkt`. The state code `y` = {Y1,Y0} is also brought out
so it can be observed. State graph (`+` rise, `-` fall):

```
0 --deliver+ / latch_addr+ idle_bar+ --> 1 --deliver- --> 2
2 --begin_send+ / latch_addr- --> 3 --begin_send- / send_pkt+ --> 4
4 --ack_send+ / send_pkt- --> 5 --ack_send- / idle_bar- --> 0
4 --deliver+ --> 6
6 --{deliver-, ack_send+} / send_pkt- latch_addr+ --> 7 --ack_send- --> 2
```

Path 4-6-7-2 is the interesting one. A new `deliver` may arrive while the
current packet is still being sent. The acknowledge of that packet and the
fall of `deliver` then form a two-input burst, in either order. After it,
the controller latches the next address without passing through idle.

State reduction merges the eight states into four rows: (0 5), (1 2 7),
(3 4) and (6). Two state variables code them as {Y1,Y0} = 00, 10, 01 and 11.
The resulting equations are:

```
Y1         = deliver + Y1*begin_send'
Y0         = begin_send + Y0*ack_send' + Y0*deliver
latch_addr = Y1*Y0'
idle_bar   = ack_send + begin_send + Y0 + Y1
send_pkt   = Y0*begin_send'
```

The term `Y0*deliver` keeps Y0 set in state 6 if `ack_send` rises before
`deliver` falls. Without it the machine would leave row (6) in the middle of
the burst. `tb_sbuf_send_ctl` applies this burst in both orders, and its
fault test removes exactly this term. The delay-ordering fix of the
original design, an extra inverter on `begin_send` into the Y0 gate, has no
zero-delay effect and is not modelled.

## C-element

`c = ab + ac + bc`: the majority function of the two inputs and the
element's own output. It is static, so no weak "trickle" inverter has to
fight the pull-up and pull-down stacks. Synthesising a two-input state
machine with this behaviour yields exactly this gate. There is no reset: the
output is defined as soon as `a == b`.

## sendr_done and the d-trio hazard

```
Y    = W8*req_s + req_s*Y
done = Y*W8'
```

Y is set when W8 rises while `req_s` is high. `done` goes high when W8
returns low, and Y clears when `req_s` falls. The hazard is in the original
wiring, where W8 fed the Y gate directly and the `done` gate through one
inverter. If Y rose before the `done` gate saw W8' fall, `done` could
glitch. The repaired wiring routes W8 through one inverter to the `done`
gate and through two to the state gate (`w8_n`, `w8_dd` in the RTL). The
`done` gate therefore always sees W8' change first. This costs nothing on
the critical path and removes the fork of W8 outside the machine. In
zero-delay RTL the two inverters are a buffer. Both versions compute the
same function, so the test checks the flow table and watches `done` for
unexpected edges.

The equations are read from a gate drawing and a Karnaugh map. One map
entry (Y=1, W8=0, req_s=0) is read as the unstable exit entry where `req_s`
has fallen, with next state 0. The entry Y=1, W8=1, req_s=0 is a don't-care
and the tests never enter it.

## NAKing arbiter, sequencer and ME

`naking_arbiter` grants the first requester (`a1`/`a2`). It answers the
other requester with a negative acknowledge (`n2`/`n1`) that follows that
request up and down. Say side 1 holds the grant and releases while side 2 is
still being NAKed. The machine then waits with `n2` high until side 2
withdraws. If side 1 requests again during that wait, it is re-granted. The
state graph is the published one. The state assignment is this design's
own: X1 marks that side 1 owns the arbiter, and X2 likewise for side 2.

```
X1 = r1*X2' + X1*r1 + X1*r2      a1 = X1*r1   n2 = X1*r2
X2 = r2*X1' + X2*r2 + X2*r1      a2 = X2*r2   n1 = X2*r1
```

This is a single-input-change machine: two requests may not change in the
same instant. Arbitration cannot be done by a deterministic AFSM, so in the
top the raw requests first pass a `sequencer`. For each request the
sequencer keeps a latched copy. A changed request (`ri != si`), gated by
`en`, asks a mutual exclusion element for a turn. The grant opens that
request's latch, which removes the request again. `s1` and `s2` therefore
never change in the same time step. The sequencer is made of ME, AND gates
and latches. How those parts are arranged is this design's own.

`mutex` is a **behavioural model**. The real ME is a 12-transistor analog
cell with a metastability filter. The model grants one request
`GRANT_DELAY` after arbitration starts, resolves ties in favour of `r1`,
holds a grant until its request falls, and then serves a waiting request. It
simulates in verilator but is not meant for synthesis.

## async_dff

This is the D flip-flop used to introduce the specification style. Its
bursts are {D-, Clk+} / Q-, {D+, Clk+} / Q+, and Clk- with no output change.
It is built from two hazard-free latch equations, which are this design's
own because the synthesised equations are not published:

```
M = D*Clk' + M*Clk + M*D
Q = M*Clk  + Q*Clk' + Q*M
```

`clk` is a handshake input here, not a system clock.

## Simulating

Each testbench in `tb/` is self-checking and ends with
`TB_RESULT checks=N failures=M`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_meat_examples_top tb/tb_meat_examples_top.sv
./obj_dir/Vtb_meat_examples_top
```

Substitute any other `tb_<module>` to test one block. `--timing` is
required, because the stimulus is delay-driven and the ME model uses delays.
Expect `UNOPTFLAT` warnings, one per feedback loop. Suppressing them with
`-Wno-UNOPTFLAT` changes nothing in the result.

The tests compare each block with a reference written from its *behaviour*,
never from the equations:
- the state graph as tables (`sbuf_send_ctl`, `naking_arbiter`);
- the Karnaugh map (`sendr_done`);
- a hold/follow model (`c_element`, `async_dff`).

Burst inputs are applied one at a time in random order. The outputs are
checked after every intermediate change, where the machine must not have
moved yet, and after the burst completes.

`tb_meat_examples_top` runs all examples at once. In it, two random 4-phase
clients contend for the arbiter, often in the same time step. The test
counts each mechanism and fails if any of them never happened:
- every arc of the send-buffer graph;
- both orders of the concurrent burst;
- C-element holds and Done pulses;
- flip-flop rises and falls;
- grants, NAKs, re-grants during a wait, and same-step request pairs.

The top has no parameters, so this run is also the full-size test.

## Departures and limits

- Zero-delay model. Response time is not modelled; the synthesised gates
  are quoted as typically 3 to 5 two-input NAND delays. Neither are
  hazards, races or the isochronous-fork problems that the
  inverter-placement fixes address.
- Reset is active high on every machine. That polarity is this design's
  choice; the NOR-with-reset structure is the published one.
- Arc 6-7 of the send-buffer graph is taken as {deliver-, ack_send+} /
  {send_pkt-, latch_addr+}. This is what the published equations do.
- `sbuf_send_ctl` brings its state variables out on `y` so they can be
  observed. In a real instance those would need the driver buffering
  described above.
- The `sendr_done` and `naking_arbiter` gate types and state codes, the
  `sequencer` arrangement, the `async_dff` equations and the ME's tie
  behaviour are this design's own.
- The Post Office chip itself is not described beyond its size (300,000
  transistors, 11 x 8.3 mm, 1.2 um CMOS), so only its send-buffer controller
  is here.
